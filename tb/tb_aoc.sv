// tb_aoc: AND-OR cell check.
// For random words d1, d2, d3 and every legal decoder pattern (none, b[1],
// b[2], b[0]) the output must be zero or exactly the selected word.
module tb_aoc;
  localparam int unsigned AW = 18;
  logic [2:0]    b;
  logic [AW-1:0] d1, d2, d3, p, exp_p;
  int checks = 0, failures = 0;

  aoc #(.AW(AW)) dut (.b(b), .d1(d1), .d2(d2), .d3(d3), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      d1 = AW'($urandom); d2 = AW'($urandom); d3 = AW'($urandom);
      for (int sel = 0; sel < 4; sel++) begin
        case (sel)
          0: begin b = 3'b000; exp_p = '0; end
          1: begin b = 3'b010; exp_p = d1; end
          2: begin b = 3'b100; exp_p = d2; end
          default: begin b = 3'b001; exp_p = d3; end
        endcase
        #1;
        checks++;
        if (p != exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL b=%b p=%h expected %h", b, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
