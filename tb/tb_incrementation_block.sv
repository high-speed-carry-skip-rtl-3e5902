// tb_incrementation_block: exhaustive check of a 4-bit incrementation block
// and a random check of an 8-bit one: sum must equal s_part + cin, truncated
// to the block width.
module tb_incrementation_block;
  localparam int unsigned W = 4;
  localparam int unsigned WL = 8;

  logic [W-1:0]  s_part, sum;
  logic          cin;
  logic [WL-1:0] ls_part, lsum;
  logic          lcin;
  int            checks = 0;
  int            failures = 0;

  incrementation_block #(.WIDTH(W))  dut      (.s_part(s_part),  .cin(cin),  .sum(sum));
  incrementation_block #(.WIDTH(WL)) dut_long (.s_part(ls_part), .cin(lcin), .sum(lsum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (W + 1)); v++) begin
      {cin, s_part} = (W + 1)'(v);
      #1;
      checks++;
      if (sum !== W'(s_part + W'(cin))) begin
        failures++;
        $display("FAIL s_part=%h cin=%0b sum=%h", s_part, cin, sum);
      end
    end
    for (int v = 0; v < (1 << (WL + 1)); v++) begin
      {lcin, ls_part} = (WL + 1)'(v);
      #1;
      checks++;
      if (lsum !== WL'(ls_part + WL'(lcin))) begin
        failures++;
        $display("FAIL 8b s_part=%h cin=%0b sum=%h", ls_part, lcin, lsum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
