// tb_ci_cska_tg_mux: test of the 32-bit carry skip adder built with
// multiplexer skip stages (SKIP_STYLE = SKIP_MUX), at the default width and
// stage size.
//
// Corner cases and 500,000 random operand pairs are applied, half of them
// with b close to ~a so that carries cross many stages; {cout, sum} is
// compared with a + b + cin computed in the testbench. From the operands the
// testbench counts how often a stage's multiplexer skips, how often a carry
// skips three or more stages in a row, and how often cin travels through
// every stage to cout; a mechanism that never occurs counts as a failure.
module tb_ci_cska_tg_mux;
  import cska_pkg::*;

  localparam int unsigned W = ADDER_WIDTH;
  localparam int unsigned S = STAGE_WIDTH;
  localparam int unsigned NST = W / S;
  localparam int unsigned NRANDOM = 500000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;
  int           skips = 0;
  int           long_skips = 0;
  int           full_props = 0;

  ci_cska_tg #(.SKIP_STYLE(SKIP_MUX)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] expect_s, carries;
    int         run;
    a   = x;
    b   = y;
    cin = c;
    expect_s = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    carries  = expect_s ^ {1'b0, x} ^ {1'b0, y};
    run = 0;
    for (int j = 1; j < int'(NST); j++) begin
      if ((x[j*S +: S] ^ y[j*S +: S]) == '1 && carries[j*S]) begin
        skips++;
        run++;
        if (run == 3) long_skips++;
      end else begin
        run = 0;
      end
    end
    if (c && ((x ^ y) == '1)) full_props++;
    #1;
    checks++;
    if ({cout, sum} !== expect_s) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h", x, y, c, cout, sum);
    end
  endtask

  initial begin
    logic [W-1:0] x, mask;
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '1, 1'(c));
      apply('1, '0, 1'(c));
      apply({(W/2){2'b01}}, {(W/2){2'b10}}, 1'(c));
      apply({(W/4){4'b0111}}, {(W/4){4'b1000}}, 1'(c));
    end
    for (int n = 0; n < int'(NRANDOM); n++) begin
      x = W'($urandom);
      if (n % 2 == 0) begin
        mask = W'($urandom) & W'($urandom) & W'($urandom) & W'($urandom);
        apply(x, ~x ^ mask, 1'($urandom));
      end else begin
        apply(x, W'($urandom), 1'($urandom));
      end
    end
    $display("multiplexer skips      : %0d", skips);
    $display("skips over >= 3 stages : %0d", long_skips);
    $display("carry from cin to cout : %0d", full_props);
    checks += 3;
    if (skips == 0)      begin failures++; $display("FAIL no skip exercised"); end
    if (long_skips == 0) begin failures++; $display("FAIL no long skip exercised"); end
    if (full_props == 0) begin failures++; $display("FAIL no full propagation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
