// tb_y86_fetch: self-checking test of the instruction split and the valP
// adder. Builds random instructions of each icode byte by byte and checks
// icode, ifun, rA, rB, valC and valP = PC + length (1, 2, 9 or 10 bytes),
// and that icodes 0xC..0xF are flagged invalid.
module tb_y86_fetch;
  logic [63:0] pc, valC, valP;
  logic [79:0] bytes;
  logic [3:0]  icode, ifun, rA, rB;
  logic        ok;
  int checks = 0, failures = 0;
  int len_tab[16] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2, 0, 0, 0, 0};

  y86_fetch dut (.pc, .bytes, .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid(ok));

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 480; i++) begin
      logic [3:0] ic, fn, ra, rb;
      logic [63:0] c;
      logic regs;
      ic = 4'(i % 16); fn = $urandom; ra = $urandom; rb = $urandom; c = {$urandom, $urandom};
      pc = {32'h0, $urandom};
      regs = ic inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'hA, 4'hB};
      bytes = {$urandom, $urandom, $urandom};
      bytes[7:0] = {ic, fn};
      if (regs) bytes[79:8] = {c, ra, rb}; else bytes[71:8] = c;
      #1;
      checks++;
      if (icode !== ic || ifun !== fn || ok !== (len_tab[ic] != 0)) begin failures++; $display("FAIL split i=%0d", i); end
      if (len_tab[ic] != 0) begin
        checks++;
        if (valP !== pc + len_tab[ic]) begin failures++; $display("FAIL valP ic=%h", ic); end
        checks++;
        if (regs ? (rA !== ra || rB !== rb) : (rA !== 4'hF || rB !== 4'hF)) begin failures++; $display("FAIL regs ic=%h", ic); end
        if (ic inside {4'h3, 4'h4, 4'h5, 4'h7, 4'h8}) begin
          checks++;
          if (valC !== c) begin failures++; $display("FAIL valC ic=%h", ic); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
