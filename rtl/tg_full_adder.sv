// tg_full_adder: one-bit full adder in transmission-gate style.
//
// The bit propagate p = a ^ b comes from a transmission-gate XOR, and the sum
// s = p ^ cin from a second one. The carry comes from a transmission-gate
// multiplexer controlled by p: when p = 1 the incoming carry is propagated
// (cout = cin), otherwise a = b and either operand is the carry (cout = a).
// The description asks for a full adder built from transmission gates; this
// two-XOR-plus-multiplexer arrangement is this design's choice of circuit.
//
// Ports: a, b operand bits; cin carry in; s sum; cout carry out;
//        p propagate (a ^ b), used by the stage's skip logic.
// Timing: purely combinational.
module tg_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic p
);

  tg_xor2 u_prop (
    .a (a),
    .b (b),
    .y (p)
  );

  tg_xor2 u_sum (
    .a (p),
    .b (cin),
    .y (s)
  );

  tg_mux2 u_carry (
    .d0  (a),
    .d1  (cin),
    .sel (p),
    .y   (cout)
  );

endmodule
