// oai21: OR-AND-Invert compound gate, y = ~((a | b) & c).
//
// In the carry skip adder it is the skip logic of even-numbered stages, which
// receive their carry complemented from an AOI stage. With a = complemented
// stage propagate, b = complemented carry in and c = complemented carry out of
// the stage's ripple chain, it restores the true carry out:
//   ~((~P | ~Ci) & ~Co) = (P & Ci) | Co.
// The use of OAI gates for the skip logic follows the description.
//
// Ports: a, b OR inputs; c AND input; y output.
// Timing: purely combinational.
module oai21 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = ~((a | b) & c);

endmodule
