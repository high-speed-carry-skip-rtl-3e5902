// tg_mux2: 2-to-1 multiplexer in transmission-gate style.
//
// A transmission-gate multiplexer is two complementary pass switches: one
// conducts d0 to the output while sel is 0 (its NMOS gate driven by sel_n,
// its PMOS gate by sel), the other conducts d1 while sel is 1. Exactly one
// switch is on at any time, so the output is always driven. Here each switch
// is written as the value it passes when on, and the two are ORed; this is
// the logic function of the cell, not a transistor netlist. The cell itself
// follows the description; writing it at gate level is this design's choice.
//
// Ports: d0, d1 data inputs; sel select (1 passes d1); y output.
// Timing: purely combinational.
module tg_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);

  logic sel_n;    // complement of the control, driven to the second gate of each switch
  logic pass0;    // value conducted by the switch that is on when sel = 0
  logic pass1;    // value conducted by the switch that is on when sel = 1

  always_comb begin
    sel_n = ~sel;
    pass0 = sel_n & d0;
    pass1 = sel & d1;
    y     = pass0 | pass1;
  end

endmodule
