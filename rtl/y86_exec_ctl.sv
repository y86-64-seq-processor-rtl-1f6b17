// y86_exec_ctl: ALU input and function selection of the SEQ execute stage.
//   aluA: valA for rrmovq/cmovXX and OPq; valC for irmovq, rmmovq, mrmovq
//         (constant or displacement); 8 for call, ret, pushq, popq
//   aluB: valB for rmmovq, mrmovq (base register), OPq and the stack
//         instructions (%rsp); 0 otherwise, so a move passes aluA through
//   alufun: ifun for OPq; subtract for pushq and call (%rsp - 8); add else
//   set_cc: only OPq writes the condition codes
// Purely combinational. The aluA choices (valA, valC, 8) and the
// displacement + rB and %rsp +/- 8 uses follow the slides; the explicit 0 on
// aluB is this design's choice.
module y86_exec_ctl
  import y86_pkg::*;
(
  input  logic [3:0]  icode,
  input  logic [3:0]  ifun,
  input  logic [63:0] valA,
  input  logic [63:0] valB,
  input  logic [63:0] valC,
  output logic [63:0] aluA,
  output logic [63:0] aluB,
  output alufun_t     alufun,
  output logic        set_cc
);
  always_comb begin
    case (icode)
      I_RRMOVQ, I_OPQ:                   aluA = valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:      aluA = valC;
      I_CALL, I_RET, I_PUSHQ, I_POPQ:    aluA = 64'd8;
      default:                           aluA = '0;
    endcase
    case (icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ,
      I_CALL, I_RET, I_PUSHQ, I_POPQ:    aluB = valB;
      default:                           aluB = '0;
    endcase
    case (icode)
      I_OPQ:
        case (ifun)
          F_SUB:   alufun = ALU_SUB;
          F_AND:   alufun = ALU_AND;
          F_XOR:   alufun = ALU_XOR;
          F_ADD:   alufun = ALU_ADD;
          default: alufun = ALU_ADD;
        endcase
      I_PUSHQ, I_CALL: alufun = ALU_SUB;
      default:         alufun = ALU_ADD;
    endcase
    set_cc = (icode == I_OPQ);
  end
endmodule
