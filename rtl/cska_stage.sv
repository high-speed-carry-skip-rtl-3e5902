// cska_stage: one stage of the concatenation-incrementation carry skip adder.
//
// The stage adds its WIDTH operand bits in an rca_block whose carry in is
// tied to 0, so this ripple chain runs in parallel with those of the other
// stages (concatenation). The stage's real carry out is
//   Co = Co_rca | (P & Ci),
// where Co_rca is the chain's carry out and P its group propagate: if some
// bit does not propagate, the carry out does not depend on Ci; if all do, the
// chain produced no carry and Co = Ci (the skip). This is formed by one
// compound gate instead of a multiplexer:
//   USE_OAI = 0: an AOI gate; the carry in is true, the carry out complemented.
//   USE_OAI = 1: an OAI gate; the carry in is complemented, the carry out true.
// Stages alternate between the two so that no inverter sits on the skip path.
// The incrementation_block then adds the true carry in to the partial sum.
// Structure and gate choice follow the description; the polarity bookkeeping
// of the OAI stage (inverters on P and Co_rca) is this design's choice.
//
// Ports: a, b operand bits of the stage; carry_i carry in (true when
//        USE_OAI = 0, complemented when USE_OAI = 1); sum; carry_o carry out
//        (complemented when USE_OAI = 0, true when USE_OAI = 1).
// Timing: purely combinational; the path from carry_i to carry_o is one gate.
module cska_stage #(
  parameter int unsigned WIDTH   = 4,
  parameter bit          USE_OAI = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             carry_i,
  output logic [WIDTH-1:0] sum,
  output logic             carry_o
);

  logic [WIDTH-1:0] s_part;   // partial sum, computed with a zero carry in
  logic             co_rca;   // carry out of the ripple chain
  logic             grp_p;    // group propagate of the stage
  logic             cin_true; // carry in at true polarity, for the incrementer

  rca_block #(.WIDTH(WIDTH)) u_rca (
    .a     (a),
    .b     (b),
    .cin   (1'b0),
    .sum   (s_part),
    .cout  (co_rca),
    .grp_p (grp_p)
  );

  if (USE_OAI) begin : g_oai
    // Carry arrives complemented: Co = ~((~P | ~Ci) & ~Co_rca).
    logic grp_p_n;
    logic co_rca_n;

    assign grp_p_n  = ~grp_p;
    assign co_rca_n = ~co_rca;
    assign cin_true = ~carry_i;

    oai21 u_skip (
      .a (grp_p_n),
      .b (carry_i),
      .c (co_rca_n),
      .y (carry_o)
    );
  end else begin : g_aoi
    // Carry arrives true: ~Co = ~((P & Ci) | Co_rca).
    assign cin_true = carry_i;

    aoi21 u_skip (
      .a (grp_p),
      .b (carry_i),
      .c (co_rca),
      .y (carry_o)
    );
  end

  incrementation_block #(.WIDTH(WIDTH)) u_inc (
    .s_part (s_part),
    .cin    (cin_true),
    .sum    (sum)
  );

endmodule
