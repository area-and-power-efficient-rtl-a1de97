// tb_dlms_top_pipe: end-to-end test of the delayed-LMS filter with the
// optional latch row between the adder trees and the shift-add tree of the
// error-computation block (PIPE = 1), otherwise at the default size.
//
// Same method as tb_dlms_top: a cycle-level reference model, which here also
// holds the latched inner product and desired sample, is compared with the
// design every cycle; the filter must identify a 4-tap FIR plant, ride
// through saturated errors and re-converge after the plant changes. The
// impulse must now reach the weights four clocks after it is applied
// (adaptation delay three).
module tb_dlms_top_pipe;
  localparam int unsigned N = lms_pkg::N_TAPS_DEF;
  localparam int unsigned L = lms_pkg::L_DEF;
  localparam int unsigned W = lms_pkg::W_DEF;
  localparam int unsigned MU = lms_pkg::MU_SHIFT_DEF;
  localparam int unsigned P = 1;   // latch row in the error-computation block

  logic           clk = 0, rst_n = 0;
  logic [L-1:0]   x_in;
  logic [W-1:0]   d_in, y_out, e_out;
  logic           sat_out;
  logic [N*W-1:0] weights;
  int checks = 0, failures = 0;
  int n_sat = 0, n_neg_msd = 0, n_updates = 0;

  dlms_top #(.PIPE(P)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in),
    .y_out(y_out), .e_out(e_out), .sat_out(sat_out), .weights(weights)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int  xh [N];            // x_n .. x_(n-N+1) as seen by the error block
  int  rw [N];            // weights
  int  rx [N];            // weight-update input line
  int  rmue, re;
  int  rxd [P+1];         // x delay towards the weight update
  longint acc_now, acc_p; // inner product now / in the latch row
  int  d_p;
  bit  rsat;
  int  exp_y, exp_e_next;
  bit  exp_sat_next;

  function automatic int sat16(input longint v, output bit s);
    s = 1'b0;
    if (v > 32767)  begin s = 1'b1; return 32767; end
    if (v < -32768) begin s = 1'b1; return -32768; end
    return int'(v);
  endfunction

  // combinational part for the current inputs
  task automatic ref_comb();
    longint acc;
    int dv;
    bit ys;
    xh[0] = int'($signed(x_in));
    acc_now = 0;
    for (int i = 0; i < N; i++) acc_now += longint'(rw[i]) * xh[i];
    acc = (P == 0) ? acc_now : acc_p;
    dv  = (P == 0) ? int'($signed(d_in)) : d_p;
    acc = acc >>> (L - 1);
    exp_y = sat16(acc, ys);
    exp_e_next = sat16(longint'(dv) - acc, exp_sat_next);
  endtask

  // register updates at a clock edge
  task automatic ref_clock();
    for (int i = 0; i < N; i++)
      rw[i] = int'($signed(W'(rw[i] + int'((longint'(rmue) * rx[i]) >>> (L - 1)))));
    rmue = re >>> MU;
    for (int i = N - 1; i > 0; i--) rx[i] = rx[i-1];
    rx[0] = rxd[P];
    for (int k = P; k > 0; k--) rxd[k] = rxd[k-1];
    rxd[0] = xh[0];
    acc_p = acc_now;
    d_p = int'($signed(d_in));
    re = exp_e_next;
    rsat = exp_sat_next;
    for (int i = N - 1; i > 0; i--) xh[i] = xh[i-1];
  endtask

  task automatic ref_reset();
    for (int i = 0; i < N; i++) begin xh[i] = 0; rw[i] = 0; rx[i] = 0; end
    rmue = 0; re = 0; rsat = 0; acc_p = 0; d_p = 0;
    for (int k = 0; k <= P; k++) rxd[k] = 0;
  endtask

  // ---------------- stimulus helpers ----------------
  int plant [N];

  function automatic int plant_out(input int xs [N]);
    longint acc = 0;
    for (int i = 0; i < N; i++) acc += longint'(plant[i]) * xs[i];
    acc = acc >>> (L - 1);
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  int px [N];   // plant input history

  // one clock: drive x and d, check y, clock, check registered outputs
  task automatic step(input int xv, input int dv);
    logic [N*W-1:0] w_before;
    @(negedge clk);
    x_in = L'(xv);
    d_in = W'(dv);
    if (x_in[L-1]) n_neg_msd++;
    ref_comb();
    #1;
    checks++;
    if (int'($signed(y_out)) != exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d expected %0d", $signed(y_out), exp_y);
    end
    w_before = weights;
    @(posedge clk);
    ref_clock();
    #1;
    if (weights != w_before) n_updates++;
    if (sat_out) n_sat++;
    checks++;
    if (int'($signed(e_out)) != re || sat_out != rsat) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d sat=%0d expected %0d/%0d", $signed(e_out), sat_out, re, rsat);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'($signed(weights[i*W +: W])) != rw[i]) begin
        failures++;
        if (failures < 10) $display("FAIL w(%0d)=%0d expected %0d", i, $signed(weights[i*W +: W]), rw[i]);
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    x_in = '0; d_in = '0;
    ref_reset();
    for (int i = 0; i < N; i++) px[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  // drive one plant sample
  task automatic plant_step(output int abs_e);
    int xv;
    xv = int'($signed(L'($urandom)));
    for (int i = N - 1; i > 0; i--) px[i] = px[i-1];
    px[0] = xv;
    step(xv, plant_out(px));
    abs_e = (re < 0) ? -re : re;
  endtask

  task automatic identify(input string tag, input int len);
    longint early = 0, late = 0;
    int ae;
    for (int t = 0; t < len; t++) begin
      plant_step(ae);
      if (t < 200) early += longint'(ae);
      if (t >= len - 200) late += longint'(ae);
    end
    $display("%s: mean |e| first 200 = %0d, last 200 = %0d", tag, early / 200, late / 200);
    checks++;
    if (late * 8 >= early) begin
      failures++;
      $display("FAIL %s: error did not converge", tag);
    end
    for (int i = 0; i < N; i++) begin
      int diff;
      diff = int'($signed(weights[i*W +: W])) - plant[i];
      checks++;
      if (diff > 200 || diff < -200) begin
        failures++;
        $display("FAIL %s: w(%0d)=%0d, plant %0d", tag, i, $signed(weights[i*W +: W]), plant[i]);
      end
    end
  endtask

  initial begin
    int first_change;
    int ae;

    // 1. impulse: adaptation delay
    do_reset();
    first_change = -1;
    step(100, 8000);
    for (int c = 1; c <= 6; c++) begin
      if (first_change < 0 && weights != '0) first_change = c;
      step(0, 0);
    end
    checks++;
    if (first_change != 3 + P) begin
      failures++;
      $display("FAIL impulse reached the weights after %0d clocks, expected %0d", first_change, 3 + P);
    end

    // 2. identify a plant: coefficients 0.5, -0.25, 0.125, 0.75 (Q2.14)
    do_reset();
    plant = '{8192, -4096, 2048, 12288};
    identify("identify", 2000);

    // 3. saturation burst
    for (int t = 0; t < 40; t++) step(int'($signed(L'($urandom))), (t % 2 != 0) ? 32767 : -32768);

    // 4. the plant changes: -0.5, 0.375, 0.25, -0.125
    plant = '{-8192, 6144, 4096, -2048};
    for (int i = 0; i < N; i++) px[i] = 0;
    identify("track", 2000);

    $display("mechanisms: saturated errors %0d, negative top digits %0d, weight updates %0d",
             n_sat, n_neg_msd, n_updates);
    checks++;
    if (n_sat == 0 || n_neg_msd == 0 || n_updates == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
