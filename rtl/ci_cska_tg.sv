// ci_cska_tg: 32-bit carry skip adder with transmission-gate cells and a
// choice of two skip structures.
//
// sum + 2^WIDTH * cout = a + b + cin, computed without a clock.
//
// The operands are cut into WIDTH / STAGE_W stages of STAGE_W bits. Stage 0
// is a plain ripple carry chain fed by cin. The later stages depend on
// SKIP_STYLE:
//
//   SKIP_AOI_OAI (default): concatenation-incrementation stages (cska_stage).
//     Each stage adds its bits with a zero carry in, so all ripple chains work
//     at the same time; the carry then travels from stage to stage through a
//     single compound gate per stage (AOI, then OAI, alternating, which also
//     alternates the polarity of the carry), and each stage's incrementation
//     block finally adds its carry in to its partial sum. The critical path
//     is one ripple chain, a row of skip gates and one incrementer.
//   SKIP_MUX: multiplexer-skip stages (cska_mux_stage). Each stage's chain
//     takes the real carry in, and a multiplexer passes the carry in straight
//     to the carry out when every bit of the stage propagates.
//
// In both, the full adders, XOR gates and multiplexers are written as the
// logic of transmission-gate cells.
//
// Follows the description: the 32-bit width, the concatenation and
// incrementation stages with AOI/OAI skip gates, the multiplexer-skip
// transmission-gate adder, and the transmission-gate full adder, XOR and
// multiplexer. This design's own choices: fixed 4-bit stages (the
// description names fixed and variable stage sizes without giving sizes),
// AOI/OAI as the default style, a plain first stage, and an inverter on the
// final carry when the last stage is an AOI stage.
//
// Ports: a, b operands; cin carry in; sum; cout carry out.
// Parameters: WIDTH operand width; STAGE_W bits per stage (WIDTH must be a
//             multiple of it); SKIP_STYLE skip structure.
// Timing: purely combinational.
module ci_cska_tg #(
  parameter int unsigned          WIDTH      = cska_pkg::ADDER_WIDTH,
  parameter int unsigned          STAGE_W    = cska_pkg::STAGE_WIDTH,
  parameter cska_pkg::skip_style_e SKIP_STYLE = cska_pkg::SKIP_AOI_OAI
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NSTAGES = WIDTH / STAGE_W;

  if (STAGE_W == 0 || WIDTH % STAGE_W != 0) begin : g_bad_size
    $error("ci_cska_tg: WIDTH must be a positive multiple of STAGE_W");
  end

  // carry_l[j] leaves stage j. With AOI/OAI skip gates it is true for even j
  // and complemented for odd j; with multiplexer skip it is always true.
  logic [NSTAGES-1:0] carry_l;
  logic               unused_p0;

  rca_block #(.WIDTH(STAGE_W)) u_stage0 (
    .a     (a[STAGE_W-1:0]),
    .b     (b[STAGE_W-1:0]),
    .cin   (cin),
    .sum   (sum[STAGE_W-1:0]),
    .cout  (carry_l[0]),
    .grp_p (unused_p0)
  );

  if (SKIP_STYLE == cska_pkg::SKIP_MUX) begin : g_mux
    // All carries at true polarity.
    for (genvar j = 1; j < NSTAGES; j++) begin : g_stage
      cska_mux_stage #(.WIDTH(STAGE_W)) u_stage (
        .a    (a[j*STAGE_W +: STAGE_W]),
        .b    (b[j*STAGE_W +: STAGE_W]),
        .cin  (carry_l[j-1]),
        .sum  (sum[j*STAGE_W +: STAGE_W]),
        .cout (carry_l[j])
      );
    end

    assign cout = carry_l[NSTAGES-1];
  end else begin : g_aoi_oai
    for (genvar j = 1; j < NSTAGES; j++) begin : g_stage
      cska_stage #(
        .WIDTH   (STAGE_W),
        .USE_OAI ((j % 2) == 0)
      ) u_stage (
        .a       (a[j*STAGE_W +: STAGE_W]),
        .b       (b[j*STAGE_W +: STAGE_W]),
        .carry_i (carry_l[j-1]),
        .sum     (sum[j*STAGE_W +: STAGE_W]),
        .carry_o (carry_l[j])
      );
    end

    if ((NSTAGES - 1) % 2 == 1) begin : g_cout_inv
      assign cout = ~carry_l[NSTAGES-1];
    end else begin : g_cout_true
      assign cout = carry_l[NSTAGES-1];
    end
  end

endmodule
