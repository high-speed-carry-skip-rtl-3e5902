// tb_tg_mux2: exhaustive check of the transmission-gate multiplexer.
// All eight input combinations are applied; y must equal d1 when sel is 1
// and d0 otherwise.
module tb_tg_mux2;
  logic d0, d1, sel, y;
  int   checks = 0;
  int   failures = 0;

  tg_mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (v >= 4 ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
