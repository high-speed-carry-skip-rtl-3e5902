// tb_cska_stage: exhaustive check of a 4-bit skip stage in both of its forms,
// the AOI stage (true carry in, complemented carry out) and the OAI stage
// (complemented carry in, true carry out). For each, the sum and the carry
// out at their polarity must match a + b + cin. The test also counts the
// cases in which the carry out is produced by skipping (all bits propagate
// and the carry in is 1) and fails if none occurred.
module tb_cska_stage;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, sum_aoi, sum_oai;
  logic         cin, co_aoi_n, co_oai;
  int           checks = 0;
  int           failures = 0;
  int           skips = 0;

  cska_stage #(.WIDTH(W), .USE_OAI(1'b0)) dut_aoi (
    .a(a), .b(b), .carry_i(cin), .sum(sum_aoi), .carry_o(co_aoi_n)
  );

  cska_stage #(.WIDTH(W), .USE_OAI(1'b1)) dut_oai (
    .a(a), .b(b), .carry_i(~cin), .sum(sum_oai), .carry_o(co_oai)
  );

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
      if ({~co_aoi_n, sum_aoi} !== ref_s) begin
        failures++;
        $display("FAIL AOI a=%h b=%h cin=%0b -> co_n=%0b sum=%h", a, b, cin, co_aoi_n, sum_aoi);
      end
      checks++;
      if ({co_oai, sum_oai} !== ref_s) begin
        failures++;
        $display("FAIL OAI a=%h b=%h cin=%0b -> co=%0b sum=%h", a, b, cin, co_oai, sum_oai);
      end
      if ((a ^ b) == '1 && cin) skips++;
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no skip case was exercised");
    end
    $display("stage skips exercised: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
