// tb_tg_full_adder: exhaustive check of the transmission-gate full adder.
// For every a, b, cin the pair {cout, s} must equal the count of ones among
// the inputs, and p must be 1 exactly when a and b differ.
module tb_tg_full_adder;
  logic a, b, cin, s, cout, p;
  int   checks = 0;
  int   failures = 0;

  tg_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      ones = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, s} !== 2'(ones)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b s=%0b", a, b, cin, cout, s);
      end
      checks++;
      if (p !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
