// times3_comb: combinational "times three" circuit.
// Two adders in series: the first forms 2*A = A + A, the second
// 3*A = 2*A + A. The result appears one adder delay after 2*A, so the
// circuit's latency is two adder delays and it can take a new A only once
// that has passed. Results wrap modulo 2**W. The two-adder structure
// follows the slides; the width W is this design's choice.
module times3_comb #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  logic [W-1:0] twice;
  assign twice = a + a;
  assign y     = twice + a;
endmodule
