// ppg: 2-bit partial-product generator.
//
// Splits the L-bit two's-complement word x into L/2 radix-4 digits
// (x[2j+1:2j], j = 0 .. L/2-1). Each digit drives a dec23 decoder whose
// outputs steer an aoc cell, giving the partial product p_j = a * digit_j.
// The lower digits are unsigned (0..3) and select from a, 2a, 3a. The most
// significant digit carries the sign of x and takes the values 0, 1, -2, -1;
// its cell is fed a, -2a, -a instead. Hence
//   sum_j p_j * 4^j = a * x.
// The multiples arrive precomputed (see pp_multiples), AW bits each.
// Output pp holds p_j in bits [j*AW +: AW]. Purely combinational.
// Defaults: L = 8 (four decoders and four cells), AW = 18 (W + 2, W = 16).
module ppg #(
  parameter int unsigned L  = 8,
  parameter int unsigned AW = 18,
  localparam int unsigned ND = L / 2
) (
  input  logic [L-1:0]     x,
  input  logic [AW-1:0]    m1,
  input  logic [AW-1:0]    m2,
  input  logic [AW-1:0]    m3,
  input  logic [AW-1:0]    mn1,
  input  logic [AW-1:0]    mn2,
  output logic [ND*AW-1:0] pp
);
  for (genvar j = 0; j < ND; j++) begin : g_digit
    logic [2:0] b;
    dec23 u_dec (.u(x[2*j+1 -: 2]), .b(b));
    if (j < ND - 1) begin : g_unsigned
      aoc #(.AW(AW)) u_aoc (
        .b(b), .d1(m1), .d2(m2), .d3(m3), .p(pp[j*AW +: AW])
      );
    end else begin : g_msd
      aoc #(.AW(AW)) u_aoc (
        .b(b), .d1(m1), .d2(mn2), .d3(mn1), .p(pp[j*AW +: AW])
      );
    end
  end
endmodule
