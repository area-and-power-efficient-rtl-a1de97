// tb_adder_tree: binary adder tree check (4 inputs of 18 bits).
// Random signed inputs, including all-maximum and all-minimum sets; the
// 20-bit output must equal their exact integer sum.
module tb_adder_tree;
  localparam int unsigned N_IN = 4;
  localparam int unsigned IW   = 18;
  localparam int unsigned OW   = IW + 2;
  logic [N_IN*IW-1:0] p;
  logic [OW-1:0]      q;
  int checks = 0, failures = 0;

  adder_tree #(.N_IN(N_IN), .IW(IW)) dut (.p(p), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode);
    int total, v;
    total = 0;
    for (int k = 0; k < N_IN; k++) begin
      case (mode)
        0: v = -(1 << (IW - 1));
        1: v = (1 << (IW - 1)) - 1;
        default: v = int'($signed(IW'($urandom)));
      endcase
      p[k*IW +: IW] = IW'(v);
      total += v;
    end
    #1;
    checks++;
    if ($signed(q) != OW'(total)) begin
      failures++;
      if (failures < 10) $display("FAIL sum %0d got %0d", total, $signed(q));
    end
  endtask

  initial begin
    run(0); run(1);
    for (int t = 0; t < 3000; t++) run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
