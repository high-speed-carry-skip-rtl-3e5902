// aoi21: AND-OR-Invert compound gate, y = ~((a & b) | c).
//
// In the carry skip adder it is the skip logic of odd-numbered stages: with
// a = stage propagate, b = true carry in and c = carry out of the stage's
// ripple chain (computed with a zero carry in), it yields the complemented
// carry out of the stage in one gate level instead of a multiplexer.
// The use of AOI gates for the skip logic follows the description.
//
// Ports: a, b AND inputs; c OR input; y output.
// Timing: purely combinational.
module aoi21 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = ~((a & b) | c);

endmodule
