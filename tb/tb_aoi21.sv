// tb_aoi21: exhaustive check of the AND-OR-Invert gate. The output must be 0
// exactly when c is 1 or both a and b are 1.
module tb_aoi21;
  logic a, b, c, y;
  int   checks = 0;
  int   failures = 0;

  aoi21 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_y;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      expect_y = (v == 0 || v == 2 || v == 4) ? 1'b1 : 1'b0;   // c = 0 and not (a and b)
      #1;
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
