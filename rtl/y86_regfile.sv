// y86_regfile: the register file of the SEQ processor.
// Fifteen 64-bit registers (%rax..%r14, numbers 0..14). Two combinational
// read ports, srcA -> valA and srcB -> valB, and two write ports, dstE/valE
// (ALU result) and dstM/valM (memory result), written on the rising clock
// edge. Register number 0xF means "no register": a write to it is dropped
// and a read of it gives 0. popq needs both write ports in one cycle; when
// both name the same register the M port wins (as in Y86-64 popq %rsp).
// The two ports and the 0xF convention follow the slides; read-as-zero,
// the port priority and clearing all registers at reset are this design's
// own choices. dbg_idx/dbg_val is an extra read port for observation.
module y86_regfile
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  srcA,
  input  logic [3:0]  srcB,
  output logic [63:0] valA,
  output logic [63:0] valB,
  input  logic [3:0]  dstE,
  input  logic [63:0] valE,
  input  logic [3:0]  dstM,
  input  logic [63:0] valM,
  input  logic [3:0]  dbg_idx,
  output logic [63:0] dbg_val
);
  logic [63:0] r [15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else begin
      if (dstE != R_NONE) r[dstE] <= valE;
      if (dstM != R_NONE) r[dstM] <= valM;
    end
  end

  assign valA    = (srcA    == R_NONE) ? '0 : r[srcA];
  assign valB    = (srcB    == R_NONE) ? '0 : r[srcB];
  assign dbg_val = (dbg_idx == R_NONE) ? '0 : r[dbg_idx];
endmodule
