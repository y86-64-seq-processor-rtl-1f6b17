// y86_pc_update: next-PC selection of the SEQ PC-update stage.
// new_pc is valP (the following instruction) except for call (valC, the
// target), jXX (valC when Cnd holds, else valP) and ret (valM, the return
// address read from the stack). Purely combinational; the result is the
// input of the PC register. Follows the slides.
module y86_pc_update
  import y86_pkg::*;
(
  input  logic [3:0]  icode,
  input  logic        cnd,
  input  logic [63:0] valC,
  input  logic [63:0] valM,
  input  logic [63:0] valP,
  output logic [63:0] new_pc
);
  always_comb begin
    case (icode)
      I_CALL:  new_pc = valC;
      I_JXX:   new_pc = cnd ? valC : valP;
      I_RET:   new_pc = valM;
      default: new_pc = valP;
    endcase
  end
endmodule
