// error_computation_block: filter output and error of the delayed-LMS filter.
//
// Computes y_n = sum_{i=0}^{N-1} w(i) * x_(n-i) and e_n = d_n - y_n.
// Structure:
//   * an input delay line (N-1 registers) supplies x_n .. x_(n-N+1);
//   * tap i has a pp_multiples unit for its weight and a 2-bit ppg, giving
//     L/2 partial products p_ij = w(i) * digit_j(x_(n-i));
//   * one adder_tree per digit position j adds p_0j .. p_(N-1)j into q_j
//     (partial products of equal place value are added before any shifting,
//     which keeps these adders narrow);
//   * one shift_add_tree combines q_0 .. q_(L/2-1) by place value into the
//     full-precision inner product (W + L + log2 N bits);
//   * the sum is rescaled by dropping its L-1 fraction bits of x (this
//     design's fixed-point choice), subtracted from d_n by a ripple-carry
//     adder and saturated to W bits.
// The error leaves through one register, so e holds e_(n-1) during cycle n.
// With PIPE = 0 (default) y is combinational (valid in the same cycle as x_in
// and w) and the trees hold no pipeline latch; that keeps the adaptation
// delay small at the cost of a long combinational path. With PIPE = 1 a
// latch row sits between the adder trees and the shift-add tree (the q_j and
// the matching d are registered), cutting the path roughly in half: y then
// belongs to the previous sample and e holds e_(n-2).
// Interface: one sample per clock, no handshake. w packs w(i) at [i*W +: W].
// Reset (asynchronous, active low) clears the delay line and the error.
module error_computation_block #(
  parameter int unsigned N_TAPS = lms_pkg::N_TAPS_DEF,
  parameter int unsigned L      = lms_pkg::L_DEF,
  parameter int unsigned W      = lms_pkg::W_DEF,
  parameter int unsigned PIPE   = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [L-1:0]        x_in,
  input  logic [W-1:0]        d_in,
  input  logic [N_TAPS*W-1:0] w,
  output logic [W-1:0]        y,
  output logic [W-1:0]        e,
  output logic                sat
);
  localparam int unsigned ND  = L / 2;
  localparam int unsigned LGN = $clog2(N_TAPS);
  localparam int unsigned AW  = W + 2;            // partial-product width
  localparam int unsigned QW  = AW + LGN;         // adder-tree output width
  localparam int unsigned OW  = W + L + LGN;      // inner-product width
  localparam int unsigned YW  = OW - (L - 1);     // after dropping x fraction
  localparam int unsigned DW  = YW + 1;           // difference width

  // ---- input delay line: xs[i] = x_(n-i) ----
  logic [L-1:0] xs [N_TAPS];
  assign xs[0] = x_in;
  for (genvar i = 1; i < N_TAPS; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) xs[i] <= '0;
      else        xs[i] <= xs[i-1];
    end
  end

  // ---- partial products: pp[i] holds the ND products of tap i ----
  logic [ND*AW-1:0] pp [N_TAPS];
  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    logic [AW-1:0] m1, m2, m3, mn1, mn2;
    pp_multiples #(.AIW(W)) u_mult (
      .a(w[i*W +: W]), .m1(m1), .m2(m2), .m3(m3), .mn1(mn1), .mn2(mn2)
    );
    ppg #(.L(L), .AW(AW)) u_ppg (
      .x(xs[i]), .m1(m1), .m2(m2), .m3(m3), .mn1(mn1), .mn2(mn2), .pp(pp[i])
    );
  end

  // ---- one adder tree per place value ----
  logic [ND*QW-1:0] q;
  for (genvar j = 0; j < ND; j++) begin : g_place
    logic [N_TAPS*AW-1:0] col;
    for (genvar i = 0; i < N_TAPS; i++) begin : g_col
      assign col[i*AW +: AW] = pp[i][j*AW +: AW];
    end
    adder_tree #(.N_IN(N_TAPS), .IW(AW)) u_tree (.p(col), .q(q[j*QW +: QW]));
  end

  // ---- optional latch row between the adder trees and the shift-add tree ----
  logic [ND*QW-1:0] q_s;
  logic [W-1:0]     d_s;
  if (PIPE != 0) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q_s <= '0;
        d_s <= '0;
      end else begin
        q_s <= q;
        d_s <= d_in;
      end
    end
  end else begin : g_nopipe
    assign q_s = q;
    assign d_s = d_in;
  end

  // ---- shift-add tree over the place values ----
  logic [OW-1:0] acc;
  shift_add_tree #(.N_IN(ND), .IW(QW), .OW(OW)) u_sat (.q(q_s), .s(acc));

  // ---- rescale, output, error ----
  logic [YW-1:0] y_full;
  logic [DW-1:0] d_ext, y_ext, diff;
  logic          diff_cout_unused, y_sat_unused, e_sat;
  logic [W-1:0]  e_next;

  assign y_full = acc[OW-1:L-1];
  assign d_ext  = {{(DW-W){d_s[W-1]}}, d_s};
  assign y_ext  = {y_full[YW-1], y_full};

  sat_trunc #(.IW(YW), .OW(W)) u_ysat (.a(y_full), .y(y), .sat(y_sat_unused));

  // d - y = d + ~y + 1
  rca #(.WIDTH(DW)) u_sub (
    .a(d_ext), .b(~y_ext), .cin(1'b1), .sum(diff), .cout(diff_cout_unused)
  );

  sat_trunc #(.IW(DW), .OW(W)) u_esat (.a(diff), .y(e_next), .sat(e_sat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e   <= '0;
      sat <= 1'b0;
    end else begin
      e   <= e_next;
      sat <= e_sat;
    end
  end
endmodule
