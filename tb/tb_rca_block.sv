// tb_rca_block: exhaustive check of a 4-bit ripple carry block and a random
// check of a 16-bit one. {cout, sum} must equal a + b + cin, and grp_p must
// be 1 exactly when every bit pair differs (a ^ b all ones).
module tb_rca_block;
  localparam int unsigned W = 4;
  localparam int unsigned WL = 16;

  logic [W-1:0]  a, b, sum;
  logic          cin, cout, grp_p;
  logic [WL-1:0] la, lb, lsum;
  logic          lcin, lcout, lgrp_p;
  int            checks = 0;
  int            failures = 0;
  int            full_props = 0;   // cases with a carry rippling through every bit

  rca_block #(.WIDTH(W)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p)
  );

  rca_block #(.WIDTH(WL)) dut_long (
    .a(la), .b(lb), .cin(lcin), .sum(lsum), .cout(lcout), .grp_p(lgrp_p)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0]  ref_s;
    logic [WL:0] ref_l;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, a, b} = (2 * W + 1)'(v);
      ref_s = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
      #1;
      checks++;
      if ({cout, sum} !== ref_s) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> %0b_%h", a, b, cin, cout, sum);
      end
      checks++;
      if (grp_p !== ((a ^ b) == '1)) begin
        failures++;
        $display("FAIL grp_p a=%h b=%h", a, b);
      end
      if ((a ^ b) == '1 && cin) full_props++;
    end
    for (int n = 0; n < 2000; n++) begin
      la   = WL'($urandom);
      lb   = (n % 4 == 0) ? ~la : WL'($urandom);
      lcin = 1'($urandom);
      ref_l = {1'b0, la} + {1'b0, lb} + {{WL{1'b0}}, lcin};
      #1;
      checks++;
      if ({lcout, lsum} !== ref_l || lgrp_p !== ((la ^ lb) == '1)) begin
        failures++;
        $display("FAIL 16b a=%h b=%h cin=%0b -> %0b_%h p=%0b", la, lb, lcin, lcout, lsum, lgrp_p);
      end
    end
    checks++;
    if (full_props == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
