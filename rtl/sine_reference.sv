// sine_reference: digital sine reference wave for the SPWM generator.
//
// A phase accumulator advances by PHASE_INC every clock, so it wraps
// F_OUT_HZ times per second.  Its top QADDR_W+2 bits are the sample index
// within one period: the two top bits select the quadrant and the rest
// address the quarter-wave table.  The symmetry of the sine fills in the
// other three quarters:
//   quadrant 0: table read forwards,  positive half
//   quadrant 1: table read backwards (address inverted), positive half
//   quadrant 2: table read forwards,  negative half
//   quadrant 3: table read backwards, negative half
// The output is offset binary, symmetric about mid-scale:
//   positive half: 2**(SAMPLE_W-1) + mag,  negative half: 2**(SAMPLE_W-1) - 1 - mag
// which is the magnitude with the sign bit inverted in front of it, and, in
// the negative half, the magnitude bits inverted.
//
// Following the design it implements: a lookup-table sine at 50 Hz, one
// quarter stored, rebuilt by symmetry.  This design's own choices: the
// phase accumulator as frequency source, 256 samples per period, 8-bit
// offset-binary samples, and an active-low asynchronous reset.
//
// Timing: ref_sample, quadrant and wrap change one clock after the phase
// accumulator (table read latency).  wrap is a one-clock pulse with the
// first sample of each new period.  Period = 2**ACC_W / PHASE_INC clocks
// (999,992.4 at the defaults, i.e. 50.0004 Hz from 50 MHz).
module sine_reference
  import spwm_pkg::*;
#(
  parameter int unsigned CLK_HZ   = CLK_HZ_DEF,
  parameter int unsigned F_OUT_HZ = F_OUT_HZ_DEF,
  parameter int unsigned ACC_W    = ACC_W_DEF,
  parameter int unsigned QADDR_W  = QADDR_W_DEF,
  parameter int unsigned SAMPLE_W = SAMPLE_W_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [SAMPLE_W-1:0] ref_sample,  // offset-binary sine sample
  output quadrant_e           quadrant,    // quadrant of ref_sample
  output logic                wrap         // first sample of a new period
);

  localparam int unsigned MAG_W = SAMPLE_W - 1;
  // Rounded phase increment: F_OUT_HZ * 2**ACC_W / CLK_HZ.
  localparam longint unsigned INC_WIDE =
      ((longint'(F_OUT_HZ) << ACC_W) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ);
  localparam logic [ACC_W-1:0] PHASE_INC = ACC_W'(INC_WIDE);

  logic [ACC_W-1:0]   acc;
  logic [QADDR_W+1:0] phase;
  logic [QADDR_W-1:0] addr;
  logic [MAG_W-1:0]   mag;
  quadrant_e          quad_d;
  logic               wrap_d;

  assign phase   = acc[ACC_W-1 -: QADDR_W+2];
  // Odd quadrants run the quarter table backwards.
  assign addr    = phase[QADDR_W] ? ~phase[QADDR_W-1:0] : phase[QADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      quad_d <= Q_RISE;
      wrap_d <= 1'b0;
    end else begin
      acc    <= acc + PHASE_INC;  // wraps modulo 2**ACC_W
      quad_d <= quadrant_e'(phase[QADDR_W+1:QADDR_W]);
      // acc below one increment: it has just wrapped (or left reset), so
      // the table is being read at the first sample of a period.
      wrap_d <= (acc < PHASE_INC);
    end
  end

  sine_quarter_rom #(
    .QADDR_W(QADDR_W),
    .MAG_W  (MAG_W)
  ) u_rom (
    .clk (clk),
    .addr(addr),
    .mag (mag)
  );

  // Negative half: invert the sign bit and the magnitude bits.
  assign ref_sample = quad_d[1] ? {1'b0, ~mag} : {1'b1, mag};
  assign quadrant   = quad_d;
  assign wrap       = wrap_d;

endmodule
