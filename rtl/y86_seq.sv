// y86_seq: single-cycle ("SEQ") Y86-64 processor.
// Every clock cycle one whole instruction passes through the six stages as
// combinational logic between the state elements:
//   fetch      instruction memory at PC -> icode:ifun, rA, rB, valC, valP
//   decode     srcA/srcB -> register file -> valA, valB
//   execute    aluA/aluB muxes -> ALU -> valE; condition codes -> Cnd
//   memory     address/data muxes -> data memory -> valM
//   write back dstE <- valE, dstM <- valM
//   PC update  valP, valC or valM -> PC register
// All state (PC, registers, condition codes, data memory) changes only on
// the rising clock edge; everything else is recomputed as its inputs
// change. This structure and the mux choices follow the slides.
//
// This design's own additions: a status register (stat) that stops the
// processor on halt (HLT), an unknown icode (INS) or an address outside a
// memory (ADR); in those cases the faulting instruction changes no state
// and the PC keeps pointing at it. A program is loaded through the
// instruction-memory write port (imem_we/imem_waddr/imem_wdata) while run
// is low; rst_n (asynchronous, active low) clears PC, registers and stat
// (to AOK). dbg_reg/dbg_val reads one register for observation.
module y86_seq
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  output logic [63:0] pc,
  output stat_t       stat,
  output cc_t         cc,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_val
);
  // fetch
  logic [79:0] ibytes;
  logic        imem_err, instr_valid;
  logic [3:0]  icode, ifun, rA, rB;
  logic [63:0] valC, valP;
  // decode / write back
  logic [3:0]  srcA, srcB, dstE, dstM, wdstE, wdstM;
  logic [63:0] valA, valB;
  // execute
  logic [63:0] aluA, aluB, valE;
  alufun_t     alufun;
  logic        set_cc, cnd;
  cc_t         cc_new;
  // memory
  logic        mem_rd, mem_wr, dmem_err;
  logic [63:0] mem_addr, mem_data, valM;
  // PC update
  logic [63:0] new_pc;
  stat_t       istat;
  logic        commit;

  y86_imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .addr(pc), .bytes(ibytes), .err(imem_err));

  y86_fetch u_fetch (
    .pc, .bytes(ibytes), .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid);

  y86_decode_ctl u_dctl (
    .icode, .rA, .rB, .cnd, .srcA, .srcB, .dstE, .dstM);

  // a faulting or halting instruction, or a stopped processor, writes nothing
  assign wdstE = commit ? dstE : R_NONE;
  assign wdstM = commit ? dstM : R_NONE;

  y86_regfile u_rf (
    .clk, .rst_n, .srcA, .srcB, .valA, .valB,
    .dstE(wdstE), .valE, .dstM(wdstM), .valM,
    .dbg_idx(dbg_reg), .dbg_val);

  y86_exec_ctl u_ectl (
    .icode, .ifun, .valA, .valB, .valC, .aluA, .aluB, .alufun, .set_cc);

  y86_alu u_alu (.aluA, .aluB, .alufun, .valE, .cc_new);

  y86_cc u_cc (
    .clk, .rst_n, .set_cc(set_cc && commit), .cc_new, .ifun, .cc, .cnd);

  y86_mem_ctl u_mctl (
    .icode, .valE, .valA, .valB, .valP, .mem_rd, .mem_wr, .mem_addr, .mem_data);

  y86_dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .rd(mem_rd), .wr(mem_wr), .commit, .addr(mem_addr), .wdata(mem_data),
    .rdata(valM), .err(dmem_err));

  y86_pc_update u_pcu (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  // status of the instruction at PC
  always_comb begin
    if (imem_err || dmem_err)  istat = S_ADR;
    else if (!instr_valid)     istat = S_INS;
    else if (icode == I_HALT)  istat = S_HLT;
    else                       istat = S_AOK;
  end

  assign commit = run && (stat == S_AOK) && (istat == S_AOK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      stat <= S_AOK;
    end else if (run && stat == S_AOK) begin
      if (istat == S_AOK) pc <= new_pc;
      stat <= istat;
    end
  end
endmodule
