// times3_pipe: pipelined "times three" circuit.
// The two adders of times3_comb are separated by pipeline registers:
//   stage 0: register A
//   stage 1: A + A -> register 2A; A is also delayed by one register
//   stage 2: 2A + A -> register 3A
// Each register holds a different input's value, so a new A can enter
// every clock cycle while each result leaves three rising edges after its
// A was presented at the input (y = 3*a from three cycles earlier). The
// clock period needs to cover only one adder delay, which is what raises
// throughput. The register placement follows the slides; the width W and
// the reset-free registers are this design's choice (the first three
// outputs after power-up are meaningless).
module times3_pipe #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  logic [W-1:0] a_s0, a_s1, twice_s1;

  always_ff @(posedge clk) begin
    a_s0     <= a;
    twice_s1 <= a_s0 + a_s0;
    a_s1     <= a_s0;
    y        <= twice_s1 + a_s1;
  end
endmodule
