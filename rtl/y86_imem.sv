// y86_imem: instruction memory of the SEQ processor.
// A byte array read at the PC: it returns the ten bytes starting at addr
// (the longest Y86-64 instruction is ten bytes), byte 0 in bits [7:0].
// The read is combinational, as the single-cycle datapath fetches, decodes
// and executes an instruction within one clock. A byte write port, clocked
// on the rising edge, loads the program; the slides show only the read side,
// so the load port and the size (BYTES) are this design's own choices.
// err is set when the PC itself lies outside the array; bytes past the
// end read as 0.
module y86_imem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [63:0] addr,
  output logic [79:0] bytes,
  output logic        err
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we && waddr < 64'(BYTES)) mem[waddr[$clog2(BYTES)-1:0]] <= wdata;
  end

  always_comb begin
    err = (addr >= 64'(BYTES));
    for (int i = 0; i < 10; i++) begin
      logic [63:0] a;
      a = addr + 64'(i);
      bytes[8*i +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end
endmodule
