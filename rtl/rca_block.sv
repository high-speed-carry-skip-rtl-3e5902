// rca_block: ripple carry chain of one carry skip stage.
//
// WIDTH transmission-gate full adders are cascaded, each carry out feeding
// the next carry in. Besides the sum and the carry out of the chain, the block
// forms the group propagate P = p[0] & ... & p[WIDTH-1] with an AND of the
// bit propagates p[i] = a[i] ^ b[i]. P = 1 is the worst case of the chain,
// where a carry entering bit 0 ripples through every full adder; the skip
// logic of the stage uses P to bypass the chain in that case. The structure
// (full adders in a ripple chain plus an AND of the propagates) follows the
// description.
//
// Ports: a, b operands; cin carry into bit 0; sum; cout carry out of the
//        last bit; grp_p group propagate.
// Timing: purely combinational; the carry path is WIDTH full adders long.
module rca_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             grp_p
);

  logic [WIDTH:0]   carry;   // carry[i] enters bit i
  logic [WIDTH-1:0] prop;    // bit propagates

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    tg_full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .s    (sum[i]),
      .cout (carry[i+1]),
      .p    (prop[i])
    );
  end

  assign cout  = carry[WIDTH];
  assign grp_p = &prop;

endmodule
