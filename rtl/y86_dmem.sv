// y86_dmem: data memory of the SEQ processor.
// A byte array accessed as 8-byte little-endian words at any byte address.
// Reads are combinational (rdata is valM within the same cycle). rd and wr
// request an access; err is set when a requested access would touch a byte
// outside the array. The write of wdata happens on the rising clock edge
// when wr and commit are both high and the address is in range; commit lets
// the processor cancel the write of an instruction that stops it without
// making err depend on its own outcome. An out-of-range read returns 0. Read/write enables, address and data
// inputs follow the slides; size, byte order and the error flag are this
// design's own choices (byte order is that of Y86-64).
module y86_dmem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        rd,
  input  logic        wr,
  input  logic        commit,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        err
);
  localparam int unsigned AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];
  logic       in_range;

  assign in_range = (addr <= 64'(BYTES - 8));
  assign err      = (rd || wr) && !in_range;

  always_ff @(posedge clk) begin
    if (wr && commit && in_range)
      for (int i = 0; i < 8; i++) mem[AW'(addr + 64'(i))] <= wdata[8*i +: 8];
  end

  always_comb begin
    for (int i = 0; i < 8; i++)
      rdata[8*i +: 8] = (rd && in_range) ? mem[AW'(addr + 64'(i))] : 8'h00;
  end
endmodule
