// lecture_top: the two designs side by side, each with its own ports.
//   - y86_seq: single-cycle Y86-64 processor (program load port, run,
//     status, PC, condition codes and one register read out for
//     observation).
//   - times3_comb and times3_pipe: the same "times three" function built
//     unpipelined (combinational) and pipelined (three cycles of latency,
//     one result per cycle).
// The designs share only the clock; nothing else connects them.
module lecture_top
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024,
  parameter int unsigned T3_W       = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // Y86-64 SEQ processor
  input  logic            cpu_run,
  input  logic            imem_we,
  input  logic [63:0]     imem_waddr,
  input  logic [7:0]      imem_wdata,
  output logic [63:0]     cpu_pc,
  output stat_t           cpu_stat,
  output cc_t             cpu_cc,
  input  logic [3:0]      dbg_reg,
  output logic [63:0]     dbg_val,
  // times three, combinational
  input  logic [T3_W-1:0] t3c_a,
  output logic [T3_W-1:0] t3c_y,
  // times three, pipelined
  input  logic [T3_W-1:0] t3p_a,
  output logic [T3_W-1:0] t3p_y
);
  y86_seq #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_cpu (
    .clk, .rst_n, .run(cpu_run), .imem_we, .imem_waddr, .imem_wdata,
    .pc(cpu_pc), .stat(cpu_stat), .cc(cpu_cc), .dbg_reg, .dbg_val);

  times3_comb #(.W(T3_W)) u_t3c (.a(t3c_a), .y(t3c_y));

  times3_pipe #(.W(T3_W)) u_t3p (.clk, .a(t3p_a), .y(t3p_y));
endmodule
