// tb_error_computation_block: cycle-level check of the error-computation block
// at N = 4, L = 8, W = 16.
// A reference keeps its own history of x. Each cycle it forms the inner
// product sum_i w(i) x_(n-i) with integer multiplies, drops the 7 fraction
// bits of x (floor), and saturates y and d - y to 16 bits. y is compared in
// the same cycle; e and the saturation flag one clock later, which also
// checks the one-cycle error latency. Phases with small and with full-range
// operands make both the normal and the saturating path occur.
// A second instance with the latch row between adder trees and shift-add
// tree (PIPE = 1) must show the same y one cycle later and the same e two
// cycles later.
module tb_error_computation_block;
  localparam int unsigned N = 4, L = 8, W = 16;
  logic               clk = 0, rst_n = 0;
  logic [L-1:0]       x_in;
  logic [W-1:0]       d_in, y, e;
  logic [N*W-1:0]     w;
  logic               sat;
  logic [W-1:0]       y_p, e_p;
  logic               sat_p;
  int checks = 0, failures = 0, n_sat = 0, cycles = 0;

  error_computation_block #(.N_TAPS(N), .L(L), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in), .w(w), .y(y), .e(e), .sat(sat)
  );

  error_computation_block #(.N_TAPS(N), .L(L), .W(W), .PIPE(1)) dut_p (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in), .w(w), .y(y_p), .e(e_p), .sat(sat_p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat16(input longint v, output bit s);
    s = 1'b0;
    if (v > 32767)  begin s = 1'b1; return 32767; end
    if (v < -32768) begin s = 1'b1; return -32768; end
    return int'(v);
  endfunction

  int xh [N];          // xh[i] = x_(n-i)
  int exp_e, exp_y;
  bit exp_sat, ys;
  int prev_y = 0, prev_e = 0;
  bit prev_sat = 0;

  initial begin
    x_in = '0; d_in = '0; w = '0;
    for (int i = 0; i < N; i++) xh[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint acc;
      bit big;
      @(negedge clk);
      big = (t % 500) >= 400;
      x_in = L'($urandom);
      for (int i = 0; i < N; i++)
        w[i*W +: W] = big ? W'($urandom) : W'(int'($signed(12'($urandom))));
      d_in = big ? W'($urandom) : W'(int'($signed(13'($urandom))));
      for (int i = N - 1; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = int'($signed(x_in));
      acc = 0;
      for (int i = 0; i < N; i++) acc += longint'($signed(w[i*W +: W])) * xh[i];
      acc = acc >>> (L - 1);
      exp_y = sat16(acc, ys);
      exp_e = sat16(longint'($signed(d_in)) - acc, exp_sat);
      #1;
      checks++;
      if (int'($signed(y)) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d expected %0d", t, $signed(y), exp_y);
      end
      checks++;
      if (int'($signed(y_p)) != prev_y) begin
        failures++;
        if (failures < 10) $display("FAIL pipelined t=%0d y=%0d expected %0d", t, $signed(y_p), prev_y);
      end
      @(posedge clk);
      #1;
      checks++;
      if (int'($signed(e_p)) != prev_e || sat_p != prev_sat) begin
        failures++;
        if (failures < 10) $display("FAIL pipelined t=%0d e=%0d expected %0d", t, $signed(e_p), prev_e);
      end
      prev_y = exp_y; prev_e = exp_e; prev_sat = exp_sat;
      cycles++;
      checks++;
      if (int'($signed(e)) != exp_e || sat != exp_sat) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d e=%0d sat=%0d expected %0d/%0d", t, $signed(e), sat, exp_e, exp_sat);
      end
      if (exp_sat) n_sat++;
    end
    checks++;
    if (n_sat == 0 || n_sat == cycles) begin
      failures++;
      $display("FAIL saturation exercised %0d of %0d cycles", n_sat, cycles);
    end
    $display("saturated errors: %0d of %0d", n_sat, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
