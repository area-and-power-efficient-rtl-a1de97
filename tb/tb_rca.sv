// tb_rca: exhaustive check of the 8-bit ripple-carry adder.
// Every pair of 8-bit operands is added with carry-in 0 and 1 and the
// 9-bit result {cout, sum} is compared with the integer sum.
module tb_rca;
  localparam int unsigned WIDTH = 8;
  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int checks = 0, failures = 0;

  rca #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < (1 << WIDTH); i++)
        for (int j = 0; j < (1 << WIDTH); j++) begin
          a = WIDTH'(i); b = WIDTH'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} != (WIDTH+1)'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", i, j, c, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
