// incrementation_block: adds a stage's carry in to its partial sum.
//
// In the concatenation-incrementation carry skip adder every stage after the
// first adds its operands with a zero carry in, so its ripple chain does not
// wait for the carries of lower stages. Once the stage's real carry in is
// known, this block adds it to the partial sum: bit i flips exactly when the
// carry in is 1 and all partial-sum bits below i are 1,
//   sum[i] = s_part[i] ^ (cin & s_part[0] & ... & s_part[i-1]).
// The running product is a chain of AND gates and each flip is a
// transmission-gate XOR. The overflow of this increment needs no output: the
// stage's skip gate already forms the right carry out. The description names
// the block and its role; the AND-chain-plus-XOR circuit is this design's
// choice, being the simplest incrementer.
//
// Ports: s_part partial sum from the ripple chain; cin true carry into the
//        stage; sum final sum bits of the stage.
// Timing: purely combinational; the carry in passes one AND and one XOR per
//         bit in the worst case.
module incrementation_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] s_part,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH-1:0] inc;   // inc[i]: carry in and all partial-sum bits below i are 1

  assign inc[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i + 1 < WIDTH) begin : g_and
      assign inc[i+1] = inc[i] & s_part[i];
    end

    tg_xor2 u_flip (
      .a (s_part[i]),
      .b (inc[i]),
      .y (sum[i])
    );
  end

endmodule
