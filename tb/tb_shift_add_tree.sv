// tb_shift_add_tree: shift-add tree check (4 place values of 20 bits, 26-bit result).
// The output must equal q0 + 4 q1 + 16 q2 + 64 q3 for random signed inputs
// kept within the range an 8-bit-by-16-bit inner product of four taps can
// produce, plus each input alone to expose a wrong shift.
module tb_shift_add_tree;
  localparam int unsigned N_IN = 4;
  localparam int unsigned IW   = 20;
  localparam int unsigned OW   = 26;
  logic [N_IN*IW-1:0] q;
  logic [OW-1:0]      s;
  int checks = 0, failures = 0;

  shift_add_tree #(.N_IN(N_IN), .IW(IW), .OW(OW)) dut (.q(q), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v [N_IN]);
    longint total;
    total = 0;
    for (int k = 0; k < N_IN; k++) begin
      q[k*IW +: IW] = IW'(v[k]);
      total += longint'(v[k]) <<< (2*k);
    end
    #1;
    checks++;
    if (longint'($signed(s)) != total) begin
      failures++;
      if (failures < 10) $display("FAIL expected %0d got %0d", total, $signed(s));
    end
  endtask

  initial begin
    int v [N_IN];
    for (int k = 0; k < N_IN; k++) begin
      for (int i = 0; i < N_IN; i++) v[i] = (i == k) ? 12345 : 0;
      check(v);
      for (int i = 0; i < N_IN; i++) v[i] = (i == k) ? -77777 : 0;
      check(v);
    end
    for (int t = 0; t < 3000; t++) begin
      // |q_j| < 2^17 keeps the true sum inside 26 bits
      for (int i = 0; i < N_IN; i++) v[i] = int'($signed(18'($urandom)));
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
