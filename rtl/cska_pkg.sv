// cska_pkg: constants shared by the carry skip adder and its testbenches.
//
// The adder is 32 bits wide, as in the schematics the design is evaluated
// with. It is split into fixed-size stages (fixed stage size, FSS) of
// 4 bits; the stage size is this design's own choice, since the source
// description names fixed and variable stage sizes but prints neither.
// skip_style_e selects how a carry crosses a stage (see ci_cska_tg).
package cska_pkg;

  // Operand width of the complete adder.
  localparam int unsigned ADDER_WIDTH = 32;

  // Bits per skip stage (fixed stage size).
  localparam int unsigned STAGE_WIDTH = 4;

  // Skip structure of the adder.
  typedef enum logic {
    SKIP_AOI_OAI = 1'b0,   // concatenation-incrementation stages, AOI/OAI skip gates
    SKIP_MUX     = 1'b1    // carry ripples into every stage, multiplexer skip
  } skip_style_e;

endpackage
