// cska_mux_stage: one stage of a multiplexer-skip carry skip adder.
//
// The stage's ripple chain (rca_block) takes the real carry in and adds the
// WIDTH operand bits. A transmission-gate multiplexer, controlled by the
// stage's group propagate P, then chooses the carry out: when every bit
// propagates it passes the carry in directly (the skip), bypassing the
// chain; otherwise it passes the chain's own carry out, which in that case
// does not depend on the carry in. The structure (full adders, XOR propagate,
// AND group propagate and a multiplexer per stage, all as transmission-gate
// cells) follows the description of the transmission-gate carry skip adder.
//
// Ports: a, b operand bits of the stage; cin carry in; sum; cout carry out.
// Timing: purely combinational; cin reaches cout through one multiplexer.
module cska_mux_stage #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic co_rca;   // carry out of the ripple chain
  logic grp_p;    // group propagate of the stage

  rca_block #(.WIDTH(WIDTH)) u_rca (
    .a     (a),
    .b     (b),
    .cin   (cin),
    .sum   (sum),
    .cout  (co_rca),
    .grp_p (grp_p)
  );

  tg_mux2 u_skip (
    .d0  (co_rca),
    .d1  (cin),
    .sel (grp_p),
    .y   (cout)
  );

endmodule
