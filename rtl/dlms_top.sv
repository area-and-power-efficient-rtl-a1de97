// dlms_top: fixed-point delayed-LMS adaptive filter built from ripple-carry adders.
//
// Each clock the filter takes one input sample x_n and one desired sample
// d_n, outputs y_n = sum_i w(i) x_(n-i), and adapts its N_TAPS weights
// towards minimising (d - y)^2 with the delayed LMS rule
//   w_(n+1)(i) = w_n(i) + mu * e_(n-2) * x_(n-2-i),   mu = 2^-MU_SHIFT.
// The error-computation block produces y_n combinationally and registers
// e_n; x_n is registered alongside so the weight-update block receives the
// matching pair (e_(n-1), x_(n-1)) in cycle n. The weight-update block
// registers its scaled-error multiples and input line, then accumulates,
// so the new weights are in use two cycles after the error was registered:
// an adaptation delay of two samples. PIPE = 1 adds a latch row inside the
// error-computation block (between its adder trees and shift-add tree):
// y_out and e_out then lag one more cycle, x is delayed one more register to
// stay aligned, and the adaptation delay grows to three samples.
// Ports: x_in (L bits, Q1.(L-1)), d_in (W bits, Q2.(W-2)); y_out (W bits,
// saturated, combinational), e_out (W bits, registered e_(n-1)), sat_out
// (e_(n-1) was saturated), weights (w(i) at [i*W +: W]).
// Reset (asynchronous, active low) zeroes all weights and registers.
module dlms_top #(
  parameter int unsigned N_TAPS   = lms_pkg::N_TAPS_DEF,
  parameter int unsigned L        = lms_pkg::L_DEF,
  parameter int unsigned W        = lms_pkg::W_DEF,
  parameter int unsigned MU_SHIFT = lms_pkg::MU_SHIFT_DEF,
  parameter int unsigned PIPE     = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [L-1:0]        x_in,
  input  logic [W-1:0]        d_in,
  output logic [W-1:0]        y_out,
  output logic [W-1:0]        e_out,
  output logic                sat_out,
  output logic [N_TAPS*W-1:0] weights
);
  logic [L-1:0] x_d [PIPE+1];

  error_computation_block #(.N_TAPS(N_TAPS), .L(L), .W(W), .PIPE(PIPE)) u_ecb (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in), .w(weights),
    .y(y_out), .e(e_out), .sat(sat_out)
  );

  // Input delay matching the latency of the error-computation block.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= PIPE; k++) x_d[k] <= '0;
    end else begin
      x_d[0] <= x_in;
      for (int k = 1; k <= PIPE; k++) x_d[k] <= x_d[k-1];
    end
  end

  weight_update_block #(.N_TAPS(N_TAPS), .L(L), .W(W), .MU_SHIFT(MU_SHIFT)) u_wub (
    .clk(clk), .rst_n(rst_n), .x_in(x_d[PIPE]), .e_in(e_out), .w(weights)
  );
endmodule
