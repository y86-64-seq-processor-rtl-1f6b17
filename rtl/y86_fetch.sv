// y86_fetch: instruction split and next-PC adder of the SEQ fetch stage.
// The bytes read from instruction memory at the PC are split into
// icode:ifun (first byte), rA:rB (register byte) and valC (the 8-byte
// little-endian constant), and valP = PC + instruction length is formed.
// Where the register byte is absent (halt, nop, ret, jXX, call) rA and rB
// are 0xF; valC follows the register byte when there is one and the first
// byte otherwise. All outputs are combinational. instr_valid is low for an
// icode outside the instruction set. The field layout and lengths are those
// of the Y86-64 instruction set.
module y86_fetch
  import y86_pkg::*;
(
  input  logic [63:0] pc,
  input  logic [79:0] bytes,
  output logic [3:0]  icode,
  output logic [3:0]  ifun,
  output logic [3:0]  rA,
  output logic [3:0]  rB,
  output logic [63:0] valC,
  output logic [63:0] valP,
  output logic        instr_valid
);
  logic       need_regids;
  logic [3:0] len;

  always_comb begin
    icode = bytes[7:4];
    ifun  = bytes[3:0];
    len   = instr_length(icode);
    instr_valid = (len != 4'd0);
    need_regids = (icode == I_RRMOVQ) || (icode == I_IRMOVQ) || (icode == I_RMMOVQ) ||
                  (icode == I_MRMOVQ) || (icode == I_OPQ)    || (icode == I_PUSHQ)  ||
                  (icode == I_POPQ);
    rA   = need_regids ? bytes[15:12] : R_NONE;
    rB   = need_regids ? bytes[11:8]  : R_NONE;
    valC = need_regids ? bytes[79:16] : bytes[71:8];
    valP = pc + 64'(len);
  end
endmodule
