// tb_times3_pipe: self-checking test of the pipelined times-three circuit.
// Feeds a new input every clock (the lecture's 7, 17, 4, 1, 23, then random
// values) and checks that each output equals 3 times the input applied
// exactly three rising edges earlier: one result per cycle, latency three.
module tb_times3_pipe;
  logic        clk = 0;
  logic [31:0] a, y;
  logic [31:0] hist[$];
  int checks = 0, failures = 0;
  int unsigned ex_in[5] = '{7, 17, 4, 1, 23};

  times3_pipe #(.W(32)) dut (.clk, .a, .y);
  always #5 clk = ~clk;

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 205; cyc++) begin
      a = (cyc < 5) ? ex_in[cyc] : $urandom;
      hist.push_back(a);
      @(posedge clk); #1;
      // after this edge, y holds 3 * (input applied 3 edges ago, counting this one)
      if (hist.size() >= 3) begin
        checks++;
        if (y !== 32'(hist[hist.size()-3] * 3)) begin
          failures++; $display("FAIL cyc=%0d y=%0d exp=%0d", cyc, y, hist[hist.size()-3] * 3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
