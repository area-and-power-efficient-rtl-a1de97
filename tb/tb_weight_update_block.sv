// tb_weight_update_block: cycle-level check of the weight-update block
// at N = 4, L = 8, W = 16, mu = 2^-4.
// The reference mirrors the two register stages: at each clock it first
// adds floor(mu_e_reg * x_reg(i) / 2^7) (wrapped to 16 bits) to each weight,
// then loads mu_e_reg = e_in >>> 4 and shifts x into its delay line.
// All N weights are compared after every clock. A separate impulse test
// checks that one error sample changes the weights exactly two clocks later.
module tb_weight_update_block;
  localparam int unsigned N = 4, L = 8, W = 16, MU = 4;
  logic           clk = 0, rst_n = 0;
  logic [L-1:0]   x_in;
  logic [W-1:0]   e_in;
  logic [N*W-1:0] w;
  int checks = 0, failures = 0;

  weight_update_block #(.N_TAPS(N), .L(L), .W(W), .MU_SHIFT(MU)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .e_in(e_in), .w(w)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rw [N], rx [N], rmue;

  task automatic ref_clock();
    for (int i = 0; i < N; i++)
      rw[i] = int'($signed(W'(rw[i] + int'((longint'(rmue) * rx[i]) >>> (L - 1)))));
    rmue = int'($signed(e_in)) >>> MU;
    for (int i = N - 1; i > 0; i--) rx[i] = rx[i-1];
    rx[0] = int'($signed(x_in));
  endtask

  task automatic compare(input string tag);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'($signed(w[i*W +: W])) != rw[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s w(%0d)=%0d expected %0d", tag, i, $signed(w[i*W +: W]), rw[i]);
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    x_in = '0; e_in = '0;
    for (int i = 0; i < N; i++) begin rw[i] = 0; rx[i] = 0; end
    rmue = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  initial begin
    int first_change;
    // impulse: e and x non-zero for one clock only
    do_reset();
    x_in = 8'sd100; e_in = 16'sd8000;
    first_change = -1;
    for (int c = 1; c <= 6; c++) begin
      @(posedge clk); #1;
      x_in = '0; e_in = '0;
      if (first_change < 0 && w != '0) first_change = c;
    end
    checks++;
    if (first_change != 2) begin
      failures++;
      $display("FAIL impulse reached the weights after %0d clocks, expected 2", first_change);
    end

    // random run
    do_reset();
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      x_in = L'($urandom);
      e_in = W'($urandom);
      @(posedge clk);
      ref_clock();
      #1 compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
