// spwm_generator: sinusoidal pulse width modulation generator (top level).
//
// Produces the gate signal for a DC/AC inverter leg whose average follows a
// 50 Hz sine.  Three blocks run from one clock:
//   sine_reference   - phase accumulator and quarter-wave sine table, the
//                      other three quarters rebuilt from the symmetry of the
//                      sine; 256 offset-binary samples per period
//   triangle_carrier - up/down counter over the same range, ~4.9 kHz
//   pwm_comparator   - spwm = (reference > carrier), registered
// The reference, its quadrant, the carrier and its direction are brought out for
// observation.  The power stage that spwm switches lies outside the chip.
//
// Following the design it implements: lookup-table sine reference reduced
// by symmetry, triangular carrier, comparison, 50 Hz output.  This design's
// own choices: 50 MHz clock, 8-bit samples, 64-entry quarter table, carrier
// divider, phase-accumulator frequency source, active-low asynchronous reset.
//
// Timing: after reset the reference starts at the first sample of a period
// and the carrier at 0, rising; spwm lags the compared values by one clock.
module spwm_generator
  import spwm_pkg::*;
#(
  parameter int unsigned CLK_HZ   = CLK_HZ_DEF,
  parameter int unsigned F_OUT_HZ = F_OUT_HZ_DEF,
  parameter int unsigned ACC_W    = ACC_W_DEF,
  parameter int unsigned QADDR_W  = QADDR_W_DEF,
  parameter int unsigned SAMPLE_W = SAMPLE_W_DEF,
  parameter int unsigned CAR_DIV  = CAR_DIV_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                spwm,        // switching signal to the inverter
  output logic [SAMPLE_W-1:0] ref_sample,  // sine reference (observation)
  output quadrant_e           quadrant,    // quadrant of ref_sample
  output logic                ref_wrap,    // first sample of a sine period
  output logic [SAMPLE_W-1:0] carrier,     // triangular carrier (observation)
  output logic                carrier_up,  // carrier is rising
  output logic                carrier_valley  // carrier period boundary
);

  sine_reference #(
    .CLK_HZ  (CLK_HZ),
    .F_OUT_HZ(F_OUT_HZ),
    .ACC_W   (ACC_W),
    .QADDR_W (QADDR_W),
    .SAMPLE_W(SAMPLE_W)
  ) u_ref (
    .clk       (clk),
    .rst_n     (rst_n),
    .ref_sample(ref_sample),
    .quadrant  (quadrant),
    .wrap      (ref_wrap)
  );

  triangle_carrier #(
    .W      (SAMPLE_W),
    .CAR_DIV(CAR_DIV)
  ) u_car (
    .clk    (clk),
    .rst_n  (rst_n),
    .carrier(carrier),
    .up     (carrier_up),
    .valley (carrier_valley)
  );

  pwm_comparator #(
    .W(SAMPLE_W)
  ) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .ref_sample(ref_sample),
    .carrier   (carrier),
    .spwm      (spwm)
  );

endmodule
