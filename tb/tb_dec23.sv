// tb_dec23: exhaustive check of the 2-to-3 decoder.
// Digit 0 must raise no line, digit 1 line b[1], digit 2 line b[2] and
// digit 3 line b[0].
module tb_dec23;
  logic [1:0] u;
  logic [2:0] b;
  logic [2:0] expected [4] = '{3'b000, 3'b010, 3'b100, 3'b001};
  int checks = 0, failures = 0;

  dec23 dut (.u(u), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      u = 2'(v);
      #1;
      checks++;
      if (b != expected[v]) begin
        failures++;
        $display("FAIL u=%0d b=%b expected %b", v, b, expected[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
