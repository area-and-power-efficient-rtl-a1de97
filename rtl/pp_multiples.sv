// pp_multiples: the five operand multiples a partial-product generator selects from.
//
// For a signed AIW-bit operand a it produces, each sign-extended to
// AW = AIW + 2 bits (two's complement):
//   m1 = a, m2 = 2a (shift), m3 = 3a (ripple-carry add of a and 2a),
//   mn1 = -a (ripple-carry add of ~a and carry-in 1), mn2 = -2a (shift of -a).
// The two extra bits hold 3a and -2a without overflow for any a.
// In the error-computation block each tap owns one of these for its weight;
// in the weight-update block a single one serves all taps (the shared
// mu*e, 3*mu*e and -mu*e sub-expressions). Purely combinational.
module pp_multiples #(
  parameter int unsigned AIW = 16,
  localparam int unsigned AW = AIW + 2
) (
  input  logic [AIW-1:0] a,
  output logic [AW-1:0]  m1,
  output logic [AW-1:0]  m2,
  output logic [AW-1:0]  m3,
  output logic [AW-1:0]  mn1,
  output logic [AW-1:0]  mn2
);
  logic [AW-1:0] a_ext;
  logic          c3_unused, cn_unused;

  assign a_ext = {{2{a[AIW-1]}}, a};
  assign m1    = a_ext;
  assign m2    = {a_ext[AW-2:0], 1'b0};

  rca #(.WIDTH(AW)) u_add3 (
    .a(a_ext), .b(m2), .cin(1'b0), .sum(m3), .cout(c3_unused)
  );

  rca #(.WIDTH(AW)) u_neg (
    .a(~a_ext), .b('0), .cin(1'b1), .sum(mn1), .cout(cn_unused)
  );

  assign mn2 = {mn1[AW-2:0], 1'b0};
endmodule
