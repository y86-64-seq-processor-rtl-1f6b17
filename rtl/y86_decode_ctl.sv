// y86_decode_ctl: register-number logic of the SEQ decode and write-back
// stages. From icode (and Cnd for cmovXX) it picks
//   srcA: rA for rrmovq/cmovXX, rmmovq, OPq, pushq, popq; else none (0xF)
//   srcB: rB for mrmovq, rmmovq, OPq; %rsp for call, ret, pushq, popq;
//         else none
//   dstE: rB for irmovq, OPq and rrmovq/cmovXX when Cnd holds; %rsp for
//         call, ret, pushq, popq; else none
//   dstM: rA for mrmovq and popq; else none
// Purely combinational. The srcA/srcB table and the dstE choices (rB, 0xF,
// %rsp, with a failed condition turning a cmov's dstE into 0xF) follow the
// slides. popq reads rA as srcA, as the slides' table lists; the value is
// unused.
module y86_decode_ctl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic [3:0] rA,
  input  logic [3:0] rB,
  input  logic       cnd,
  output logic [3:0] srcA,
  output logic [3:0] srcB,
  output logic [3:0] dstE,
  output logic [3:0] dstM
);
  always_comb begin
    srcA = R_NONE;
    srcB = R_NONE;
    dstE = R_NONE;
    dstM = R_NONE;
    case (icode)
      I_RRMOVQ: begin srcA = rA; dstE = cnd ? rB : R_NONE; end
      I_IRMOVQ: begin dstE = rB; end
      I_RMMOVQ: begin srcA = rA; srcB = rB; end
      I_MRMOVQ: begin srcB = rB; dstM = rA; end
      I_OPQ:    begin srcA = rA; srcB = rB; dstE = rB; end
      I_CALL,
      I_RET:    begin srcB = R_RSP; dstE = R_RSP; end
      I_PUSHQ:  begin srcA = rA; srcB = R_RSP; dstE = R_RSP; end
      I_POPQ:   begin srcA = rA; srcB = R_RSP; dstE = R_RSP; dstM = rA; end
      default:  ;
    endcase
  end
endmodule
