// rca: WIDTH-bit ripple-carry adder.
//
// A chain of WIDTH full adders: bit i adds a[i], b[i] and the carry out of
// bit i-1; the carry into bit 0 is cin. The worst-case delay is the carry
// rippling from bit 0 to bit WIDTH-1, i.e. (WIDTH-1) carry delays plus one
// sum delay, in exchange for the smallest area and switching power of the
// common adder structures. Every adder in the filter is one of these.
// Purely combinational; sum is modulo 2^WIDTH, cout is the carry out of the
// top bit. The default WIDTH = 8 is the eight-stage example adder.
module rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
