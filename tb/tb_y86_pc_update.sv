// tb_y86_pc_update: self-checking test of next-PC selection: valP for
// ordinary instructions, valC for call and taken jumps, valP for jumps not
// taken, valM for ret.
module tb_y86_pc_update;
  import y86_pkg::*;
  logic [3:0]  icode;
  logic        cnd;
  logic [63:0] valC, valM, valP, new_pc, exp_pc;
  int checks = 0, failures = 0;

  y86_pc_update dut (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      icode = 4'(i % 12); cnd = $urandom; valC = {$urandom, $urandom};
      valM = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      if (icode == 4'h8)                exp_pc = valC;
      else if (icode == 4'h7 && cnd)    exp_pc = valC;
      else if (icode == 4'h9)           exp_pc = valM;
      else                              exp_pc = valP;
      checks++;
      if (new_pc !== exp_pc) begin failures++; $display("FAIL icode=%h cnd=%b", icode, cnd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
