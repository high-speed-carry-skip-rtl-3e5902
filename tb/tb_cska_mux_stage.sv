// tb_cska_mux_stage: exhaustive check of a 4-bit multiplexer-skip stage.
// {cout, sum} must equal a + b + cin for every input combination. The test
// counts the cases in which the multiplexer skips (all bits propagate and
// the carry in is 1) and fails if none occurred.
module tb_cska_mux_stage;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;
  int           skips = 0;

  cska_mux_stage #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_s;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, a, b} = (2 * W + 1)'(v);
      ref_s = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
      #1;
      checks++;
      if ({cout, sum} !== ref_s) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> %0b_%h", a, b, cin, cout, sum);
      end
      if ((a ^ b) == '1 && cin) skips++;
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no skip case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
