// aoc: AND-OR cell of a partial-product generator.
//
// Three AND cells each gate one AW-bit word with one decoder line, and two OR
// cells merge the three gated words:
//   p = (d1 & {AW{b[1]}}) | (d2 & {AW{b[2]}}) | (d3 & {AW{b[0]}})
// With d1 = a, d2 = 2a, d3 = 3a and b from dec23 this is a times a 2-bit
// digit; for the signed top digit the words a, -2a, -a are fed instead.
// The decoder is one-hot or all-zero, so the ORs never mix two words.
// Purely combinational. AW defaults to W + 2 = 18 (16-bit operand, W = 16
// being this design's choice).
module aoc #(
  parameter int unsigned AW = 18
) (
  input  logic [2:0]    b,
  input  logic [AW-1:0] d1,
  input  logic [AW-1:0] d2,
  input  logic [AW-1:0] d3,
  output logic [AW-1:0] p
);
  logic [AW-1:0] and1, and2, and3;
  always_comb begin
    and1 = d1 & {AW{b[1]}};
    and2 = d2 & {AW{b[2]}};
    and3 = d3 & {AW{b[0]}};
    p    = (and1 | and2) | and3;
  end
endmodule
