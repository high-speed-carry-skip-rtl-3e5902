// tb_tg_xor2: exhaustive check of the transmission-gate XOR against its
// truth table (0110 for ab = 00, 01, 10, 11).
module tb_tg_xor2;
  logic       a, b, y;
  logic [3:0] table_y = 4'b0110;   // indexed by {a, b}
  int         checks = 0;
  int         failures = 0;

  tg_xor2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== table_y[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
