// tb_ci_cska_tg: end-to-end test of the 32-bit carry skip adder at its
// default parameters.
//
// Operands are applied one pair per nanosecond; {cout, sum} is compared with
// a + b + cin computed by a plain 33-bit addition in the testbench. Corner
// cases come first (zero, all ones, full-length propagation, alternating
// patterns), then random operands; half of the random pairs are drawn so
// that most bit pairs propagate (b close to ~a), which makes carries travel
// across several stages through the skip gates.
//
// From each operand pair the testbench works out, without looking inside the
// adder, which of the adder's mechanisms the pair exercises, and counts them:
//   skip through an AOI stage / an OAI stage (stage propagates, carry in 1),
//   a carry skipping over three or more consecutive stages,
//   a carry from cin travelling through every stage,
//   a carry generated inside a stage's own ripple chain,
//   an increment that ripples inside a stage's incrementation block,
//   a carry out of the adder.
// Each mechanism that never occurs counts as a failure.
module tb_ci_cska_tg;
  import cska_pkg::*;

  localparam int unsigned W = ADDER_WIDTH;
  localparam int unsigned S = STAGE_WIDTH;
  localparam int unsigned NST = W / S;
  localparam int unsigned NRANDOM = 1000000;

  typedef enum int unsigned {
    EV_SKIP_AOI,      // skip through an odd (AOI) stage
    EV_SKIP_OAI,      // skip through an even (OAI) stage
    EV_LONG_SKIP,     // one carry skips three or more stages in a row
    EV_FULL_PROP,     // carry from cin reaches cout through every stage
    EV_GENERATE,      // a later stage's ripple chain produces a carry itself
    EV_INC_RIPPLE,    // an increment carries inside the incrementation block
    EV_COUT,          // carry out of the adder is 1
    EV_COUNT
  } event_e;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;
  int           seen [EV_COUNT];

  ci_cska_tg dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify the operand pair and count the mechanisms it exercises.
  function automatic void classify(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0]   total;
    logic [W:0]   carries;   // carries[i]: carry into bit i (carries[W] = carry out)
    logic [S-1:0] xs, ys, part;
    logic         stage_p, stage_c, rca_co;
    int           run;
    total   = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    carries = total ^ {1'b0, x} ^ {1'b0, y};
    run = 0;
    for (int j = 1; j < int'(NST); j++) begin
      xs      = x[j*S +: S];
      ys      = y[j*S +: S];
      stage_p = ((xs ^ ys) == '1);
      stage_c = carries[j*S];
      {rca_co, part} = {1'b0, xs} + {1'b0, ys};
      if (stage_p && stage_c) begin
        if (j % 2 == 1) seen[EV_SKIP_AOI]++;
        else            seen[EV_SKIP_OAI]++;
        run++;
        if (run == 3) seen[EV_LONG_SKIP]++;
      end else begin
        run = 0;
      end
      if (rca_co) seen[EV_GENERATE]++;
      if (stage_c && part[0]) seen[EV_INC_RIPPLE]++;
    end
    if (c && ((x ^ y) == '1)) seen[EV_FULL_PROP]++;
    if (total[W]) seen[EV_COUT]++;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] expect_s;
    a   = x;
    b   = y;
    cin = c;
    expect_s = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    classify(x, y, c);
    #1;
    checks++;
    if ({cout, sum} !== expect_s) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h, expected %0b_%h",
                 x, y, c, cout, sum, expect_s[W], expect_s[W-1:0]);
    end
  endtask

  initial begin
    logic [W-1:0] x, mask;
    foreach (seen[e]) seen[e] = 0;

    // Corner cases.
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '1, 1'(c));
      apply('1, '0, 1'(c));
      apply('0, '1, 1'(c));
      apply({(W/2){2'b01}}, {(W/2){2'b10}}, 1'(c));
      apply({(W/2){2'b01}}, {(W/2){2'b01}}, 1'(c));
      apply({(W/4){4'b1000}}, {(W/4){4'b1000}}, 1'(c));
      apply({(W/4){4'b0111}}, {(W/4){4'b1000}}, 1'(c));
    end
    // A generate in each stage, followed by full propagation above it.
    for (int j = 0; j < int'(NST); j++) begin
      x = '1;
      x[j*S +: S] = '1;
      apply(x, W'(1) << (j * S), 1'b0);
      apply('1 << (j * S), W'(1) << (j * S), 1'b0);
    end

    // Random operands.
    for (int n = 0; n < int'(NRANDOM); n++) begin
      x = W'($urandom);
      if (n % 2 == 0) begin
        mask = W'($urandom) & W'($urandom) & W'($urandom) & W'($urandom);
        apply(x, ~x ^ mask, 1'($urandom));
      end else begin
        apply(x, W'($urandom), 1'($urandom));
      end
    end

    $display("skips through AOI stages      : %0d", seen[EV_SKIP_AOI]);
    $display("skips through OAI stages      : %0d", seen[EV_SKIP_OAI]);
    $display("skips over >= 3 stages        : %0d", seen[EV_LONG_SKIP]);
    $display("carry from cin to cout        : %0d", seen[EV_FULL_PROP]);
    $display("carries generated in a stage  : %0d", seen[EV_GENERATE]);
    $display("incrementer ripples           : %0d", seen[EV_INC_RIPPLE]);
    $display("carry out of the adder        : %0d", seen[EV_COUT]);
    for (int e = 0; e < int'(EV_COUNT); e++) begin
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never exercised", e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
