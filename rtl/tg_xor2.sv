// tg_xor2: 2-input XOR in transmission-gate style.
//
// The transmission-gate XOR steers either b or its complement to the output,
// with a as the control of the switch pair: a = 0 passes b, a = 1 passes b_n.
// It is therefore built here from one inverter and one tg_mux2. This is the
// usual transmission-gate XOR; the description asks for a transmission-gate
// XOR but does not print its circuit, so the exact arrangement is this
// design's choice.
//
// Ports: a, b inputs; y = a ^ b.
// Timing: purely combinational.
module tg_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  logic b_n;

  always_comb b_n = ~b;

  tg_mux2 u_steer (
    .d0  (b),
    .d1  (b_n),
    .sel (a),
    .y   (y)
  );

endmodule
