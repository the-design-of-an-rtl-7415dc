// pwm_comparator: the SPWM modulator proper.
//
// The switching signal is high while the sine reference lies above the
// triangular carrier and low otherwise, so the pulse width in each carrier
// period follows the sine.  Both inputs are unsigned (offset binary) of the
// same width.  The result is registered so that the output pin sees no
// comparator glitches: spwm follows the inputs one clock later.
//
// Following the design it implements: comparing a sine reference with a
// triangular carrier.  This design's own choices: the strict ">" (equal
// values give a low output), the output register and its reset to 0.
module pwm_comparator #(
  parameter int unsigned W = spwm_pkg::SAMPLE_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ref_sample,
  input  logic [W-1:0] carrier,
  output logic         spwm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spwm <= 1'b0;
    else        spwm <= (ref_sample > carrier);
  end

endmodule
