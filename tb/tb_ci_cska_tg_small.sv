// tb_ci_cska_tg_small: exhaustive tests of the carry skip adder in small
// configurations, to cover every operand combination and both ways the last
// stage can end the carry chain.
//   8-bit, 2-bit stages: four stages, the last an AOI stage whose
//                        complemented carry is inverted for cout.
//   6-bit, 2-bit stages: three stages, the last an OAI stage with a true
//                        carry out.
//   3-bit, 3-bit stages: a single plain ripple stage.
//   8-bit, 2-bit stages with multiplexer skip stages.
// Every combination of a, b and cin is applied and {cout, sum} is compared
// with a + b + cin computed in the testbench.
module tb_ci_cska_tg_small;
  logic [7:0] a8, b8, s8;
  logic [5:0] a6, b6, s6;
  logic [2:0] a3, b3, s3;
  logic [7:0] sm8;
  logic       cin, co8, co6, co3, com8;
  int         checks = 0;
  int         failures = 0;

  ci_cska_tg #(.WIDTH(8), .STAGE_W(2)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8));
  ci_cska_tg #(.WIDTH(6), .STAGE_W(2)) dut6 (.a(a6), .b(b6), .cin(cin), .sum(s6), .cout(co6));
  ci_cska_tg #(.WIDTH(3), .STAGE_W(3)) dut3 (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(co3));
  ci_cska_tg #(.WIDTH(8), .STAGE_W(2), .SKIP_STYLE(cska_pkg::SKIP_MUX)) dutm8 (
    .a(a8), .b(b8), .cin(cin), .sum(sm8), .cout(com8)
  );

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a8, b8} = 17'(v);
      a6 = a8[5:0];
      b6 = b8[5:0];
      a3 = a8[2:0];
      b3 = b8[2:0];
      #1;
      checks++;
      if ({co8, s8} !== 9'({1'b0, a8} + {1'b0, b8} + {8'd0, cin})) begin
        failures++;
        if (failures <= 10) $display("FAIL 8b a=%h b=%h cin=%0b -> %0b_%h", a8, b8, cin, co8, s8);
      end
      checks++;
      if ({com8, sm8} !== 9'({1'b0, a8} + {1'b0, b8} + {8'd0, cin})) begin
        failures++;
        if (failures <= 10) $display("FAIL 8b mux a=%h b=%h cin=%0b -> %0b_%h", a8, b8, cin, com8, sm8);
      end
      if (a8[7:6] == 2'b00 && b8[7:6] == 2'b00) begin
        checks++;
        if ({co6, s6} !== 7'({1'b0, a6} + {1'b0, b6} + {6'd0, cin})) begin
          failures++;
          if (failures <= 10) $display("FAIL 6b a=%h b=%h cin=%0b -> %0b_%h", a6, b6, cin, co6, s6);
        end
      end
      if (a8[7:3] == 5'd0 && b8[7:3] == 5'd0) begin
        checks++;
        if ({co3, s3} !== 4'({1'b0, a3} + {1'b0, b3} + {3'd0, cin})) begin
          failures++;
          if (failures <= 10) $display("FAIL 3b a=%h b=%h cin=%0b -> %0b_%h", a3, b3, cin, co3, s3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
