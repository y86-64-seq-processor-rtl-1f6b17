// tb_times3_comb: self-checking test of the combinational times-three
// circuit. Uses the input values of the lecture example (7, 17, 4, 1, 23
// giving 21, 51, 12, 3, 69) and random values, compared with 3*a mod 2**32.
module tb_times3_comb;
  logic [31:0] a, y;
  int checks = 0, failures = 0;
  int unsigned ex_in[5]  = '{7, 17, 4, 1, 23};
  int unsigned ex_out[5] = '{21, 51, 12, 3, 69};

  times3_comb #(.W(32)) dut (.a, .y);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      a = ex_in[i]; #1; checks++;
      if (y !== ex_out[i]) begin failures++; $display("FAIL a=%0d y=%0d", a, y); end
    end
    for (int i = 0; i < 300; i++) begin
      a = $urandom; #1; checks++;
      if (y !== 32'(a * 3)) begin failures++; $display("FAIL a=%0d y=%0d", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
