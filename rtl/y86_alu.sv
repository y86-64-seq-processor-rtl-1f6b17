// y86_alu: the 64-bit ALU of the SEQ execute stage.
// valE = aluA + aluB, aluB - aluA, aluA & aluB or aluA ^ aluB, as alufun
// selects (the four OPq operations add, sub, and, xor). It also forms the
// condition codes the result would set: ZF (result zero), SF (result
// negative) and OF (signed overflow of the add or subtract; 0 for and/xor).
// Purely combinational. The operation set follows the slides; the flag
// definitions are those of the Y86-64 instruction set.
module y86_alu
  import y86_pkg::*;
(
  input  logic [63:0] aluA,
  input  logic [63:0] aluB,
  input  alufun_t     alufun,
  output logic [63:0] valE,
  output cc_t         cc_new
);
  always_comb begin
    unique case (alufun)
      ALU_ADD: valE = aluB + aluA;
      ALU_SUB: valE = aluB - aluA;
      ALU_AND: valE = aluB & aluA;
      ALU_XOR: valE = aluB ^ aluA;
    endcase
    cc_new.zf = (valE == '0);
    cc_new.sf = valE[63];
    unique case (alufun)
      ALU_ADD: cc_new.of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      ALU_SUB: cc_new.of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: cc_new.of = 1'b0;
    endcase
  end
endmodule
