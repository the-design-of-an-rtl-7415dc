// spwm_pkg: types and default sizes shared by the SPWM generator blocks.
//
// The reference sine is held as a quarter-wave table and unfolded over the
// four quadrants of a period; quadrant_e names those quadrants.  The sample
// width, table depth, clock frequency and carrier divider below are this
// design's own choices; the 50 Hz output frequency is the target the whole
// generator is built for.
package spwm_pkg;

  // Output (reference) frequency of the generated sine, in Hz.
  localparam int unsigned F_OUT_HZ_DEF  = 50;
  // System clock, in Hz (a common 50 MHz board oscillator).
  localparam int unsigned CLK_HZ_DEF    = 50_000_000;
  // Width of the reference and carrier samples, offset binary.
  localparam int unsigned SAMPLE_W_DEF  = 8;
  // log2 of the number of quarter-wave table entries.
  localparam int unsigned QADDR_W_DEF   = 6;
  // Width of the phase accumulator.
  localparam int unsigned ACC_W_DEF     = 32;
  // Clock cycles per carrier step.
  localparam int unsigned CAR_DIV_DEF   = 20;

  // Quadrant of the reference period, from the two top phase bits.
  typedef enum logic [1:0] {
    Q_RISE     = 2'd0,  // 0    .. pi/2 : table read forwards, positive
    Q_FALL     = 2'd1,  // pi/2 .. pi   : table read backwards, positive
    Q_NEG_FALL = 2'd2,  // pi   .. 3pi/2: table read forwards, negative
    Q_NEG_RISE = 2'd3   // 3pi/2.. 2pi  : table read backwards, negative
  } quadrant_e;

endpackage
