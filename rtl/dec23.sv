// dec23: 2-to-3 decoder of a partial-product generator.
//
// Takes one 2-bit digit u = {u1, u0} of the input word and raises at most one
// of three select lines:
//   b[0] = u0 &  u1   (digit value 3)
//   b[1] = u0 & ~u1   (digit value 1)
//   b[2] = ~u0 & u1   (digit value 2)
// Digit value 0 raises none, so the AND-OR cell behind it outputs zero.
// Purely combinational; the equations are those of the design.
module dec23 (
  input  logic [1:0] u,
  output logic [2:0] b
);
  always_comb begin
    b[0] =  u[0] &  u[1];
    b[1] =  u[0] & ~u[1];
    b[2] = ~u[0] &  u[1];
  end
endmodule
