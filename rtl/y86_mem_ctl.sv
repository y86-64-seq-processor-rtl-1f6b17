// y86_mem_ctl: control of the data memory in the SEQ memory stage.
//   mem_rd:   mrmovq, popq, ret
//   mem_wr:   rmmovq, pushq, call
//   mem_addr: valE (ALU output) mostly; valB, the %rsp read from the
//             register file, for popq and ret, which read the old stack top
//   mem_data: valA mostly; valP (the return address) for call
// Purely combinational. The two muxes and their special cases (popq, ret
// for the address; call for the data) follow the slides, which draw the
// address mux fed from R[srcB] and the data mux fed from PC+9.
module y86_mem_ctl
  import y86_pkg::*;
(
  input  logic [3:0]  icode,
  input  logic [63:0] valE,
  input  logic [63:0] valA,
  input  logic [63:0] valB,
  input  logic [63:0] valP,
  output logic        mem_rd,
  output logic        mem_wr,
  output logic [63:0] mem_addr,
  output logic [63:0] mem_data
);
  always_comb begin
    mem_rd   = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
    mem_wr   = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
    mem_addr = (icode == I_POPQ || icode == I_RET) ? valB : valE;
    mem_data = (icode == I_CALL) ? valP : valA;
  end
endmodule
