// tb_ppg: partial-product generator check (L = 8, 16-bit operand).
// The multiples a, 2a, 3a, -a, -2a are computed here with integer
// arithmetic. For each random (a, x), including the extreme values, every
// partial product must equal a times its radix-4 digit (the top digit read
// as a signed value 0, 1, -2, -1), and their place-value sum must equal a*x.
module tb_ppg;
  localparam int unsigned L  = 8;
  localparam int unsigned AIW = 16;
  localparam int unsigned AW = AIW + 2;
  localparam int unsigned ND = L / 2;
  logic [L-1:0]     x;
  logic [AW-1:0]    m1, m2, m3, mn1, mn2;
  logic [ND*AW-1:0] pp;
  int checks = 0, failures = 0;

  ppg #(.L(L), .AW(AW)) dut (.x(x), .m1(m1), .m2(m2), .m3(m3), .mn1(mn1), .mn2(mn2), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int xv);
    longint total;
    int digit;
    m1 = AW'(a); m2 = AW'(2*a); m3 = AW'(3*a); mn1 = AW'(-a); mn2 = AW'(-2*a);
    x = L'(xv);
    #1;
    total = 0;
    for (int j = 0; j < ND; j++) begin
      digit = int'(x[2*j +: 2]);
      if (j == ND - 1 && digit >= 2) digit -= 4;
      checks++;
      if ($signed(pp[j*AW +: AW]) != AW'(a * digit)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d x=%0d digit %0d: %0d", a, xv, j, $signed(pp[j*AW +: AW]));
      end
      total += longint'($signed(pp[j*AW +: AW])) <<< (2*j);
    end
    checks++;
    if (total != longint'(a) * longint'($signed(x))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d x=%0d product %0d", a, xv, total);
    end
  endtask

  initial begin
    run(-32768, -128); run(32767, -128); run(-32768, 127); run(32767, 127); run(1, -1);
    for (int t = 0; t < 2000; t++)
      run(int'($signed(16'($urandom))), int'($signed(8'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
