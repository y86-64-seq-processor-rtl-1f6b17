// y86_cc: condition-code register and condition logic of the SEQ execute
// stage. The register holds ZF, SF, OF; it takes cc_new on the rising edge
// when set_cc is high (only OPq sets it) and clears to ZF=1, SF=0, OF=0 at
// reset. From the stored (prior) codes and ifun it forms Cnd for jXX and
// cmovXX, combinationally:
//   always 1; le (SF^OF)|ZF; l SF^OF; e ZF; ne ~ZF; ge ~(SF^OF); g ~(SF^OF)&~ZF
// The slides' picture of this mux writes le as SF|ZF and l as SF, which is
// the same whenever OF is 0; the full Y86-64 definitions with OF are used
// here. Codes 7..15 give Cnd = 0. The reset value is this design's choice.
module y86_cc
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       set_cc,
  input  cc_t        cc_new,
  input  logic [3:0] ifun,
  output cc_t        cc,
  output logic       cnd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= cc_new;
  end

  logic lt;
  always_comb begin
    lt = cc.sf ^ cc.of;
    case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = lt | cc.zf;
      C_L:      cnd = lt;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = ~cc.zf;
      C_GE:     cnd = ~lt;
      C_G:      cnd = ~lt & ~cc.zf;
      default:  cnd = 1'b0;
    endcase
  end
endmodule
