// weight_update_block: N multiply-accumulate units that adapt the filter weights.
//
// Performs w(i) <= w(i) + (mu * e) * x_(k-i) for i = 0 .. N-1, where e and
// x_k arrive together on e_in and x_in.
// Structure:
//   * mu = 2^-MU_SHIFT, so mu*e is an arithmetic right shift of e_in;
//   * one shared pp_multiples unit forms mu*e, 3*mu*e and -mu*e; these three
//     are registered and 2*mu*e and -2*mu*e are taken from the registers by a
//     one-bit left shift, so all N generators share one adder for 3*mu*e and
//     one for the negation;
//   * an input delay line of N registers supplies x_k .. x_(k-N+1) to the N
//     ppg units, aligned with the registered mu*e;
//   * each tap has its own shift_add_tree forming the full product
//     (W + L bits), from which the L-1 fraction bits of x are dropped
//     (this design's fixed-point choice) to give a W-bit increment;
//   * a W-bit ripple-carry adder and register per tap accumulate the weight.
//     The weight wraps modulo 2^W; the error saturation upstream keeps the
//     increments small enough that this does not happen in normal use.
// Timing: e_in/x_in sampled at edge t are multiplied during the next cycle
// and the updated weights appear on w after edge t+1 (two register stages).
// Interface: one update per clock, no handshake. w packs w(i) at [i*W +: W].
// Reset (asynchronous, active low) clears the weights and all registers.
module weight_update_block #(
  parameter int unsigned N_TAPS   = lms_pkg::N_TAPS_DEF,
  parameter int unsigned L        = lms_pkg::L_DEF,
  parameter int unsigned W        = lms_pkg::W_DEF,
  parameter int unsigned MU_SHIFT = lms_pkg::MU_SHIFT_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [L-1:0]        x_in,
  input  logic [W-1:0]        e_in,
  output logic [N_TAPS*W-1:0] w
);
  localparam int unsigned ND = L / 2;
  localparam int unsigned AW = W + 2;
  localparam int unsigned PW = W + L;      // full product width

  // ---- shared scaled-error multiples ----
  logic [W-1:0]  mue;
  logic [AW-1:0] m1, m2_unused, m3, mn1, mn2_unused;
  logic [AW-1:0] r_m1, r_m3, r_mn1;
  logic [AW-1:0] s_m2, s_mn2;

  assign mue = W'($signed(e_in) >>> MU_SHIFT);

  pp_multiples #(.AIW(W)) u_mult (
    .a(mue), .m1(m1), .m2(m2_unused), .m3(m3), .mn1(mn1), .mn2(mn2_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_m1  <= '0;
      r_m3  <= '0;
      r_mn1 <= '0;
    end else begin
      r_m1  <= m1;
      r_m3  <= m3;
      r_mn1 <= mn1;
    end
  end

  assign s_m2  = {r_m1[AW-2:0], 1'b0};
  assign s_mn2 = {r_mn1[AW-2:0], 1'b0};

  // ---- input delay line: xr[i] = x_(k-i) aligned with the registered mu*e_k ----
  logic [L-1:0] xr [N_TAPS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xr[0] <= '0;
    else        xr[0] <= x_in;
  end
  for (genvar i = 1; i < N_TAPS; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) xr[i] <= '0;
      else        xr[i] <= xr[i-1];
    end
  end

  // ---- per-tap MAC ----
  for (genvar i = 0; i < N_TAPS; i++) begin : g_mac
    logic [ND*AW-1:0] pp;
    logic [PW-1:0]    prod;
    logic [W-1:0]     inc, w_next;
    logic             cout_unused;

    ppg #(.L(L), .AW(AW)) u_ppg (
      .x(xr[i]), .m1(r_m1), .m2(s_m2), .m3(r_m3), .mn1(r_mn1), .mn2(s_mn2),
      .pp(pp)
    );

    shift_add_tree #(.N_IN(ND), .IW(AW), .OW(PW)) u_sat (.q(pp), .s(prod));

    assign inc = prod[W+L-2:L-1];

    rca #(.WIDTH(W)) u_acc (
      .a(w[i*W +: W]), .b(inc), .cin(1'b0), .sum(w_next), .cout(cout_unused)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) w[i*W +: W] <= '0;
      else        w[i*W +: W] <= w_next;
    end
  end
endmodule
