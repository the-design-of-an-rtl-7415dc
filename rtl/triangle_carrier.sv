// triangle_carrier: symmetric triangular carrier wave.
//
// An up/down counter runs 0, 1, ..., 2**W-1, 2**W-2, ..., 1, 0, 1, ... and
// takes one step every CAR_DIV clocks, so one carrier period is
// 2 * (2**W - 1) * CAR_DIV clocks (10,200 clocks, 4.90 kHz from 50 MHz at
// the defaults).  The carrier spans the same offset-binary range as the
// reference sine, so comparing the two gives the SPWM pulses directly.
//
// Following the design it implements: a high-frequency triangular carrier.
// This design's own choices: counter form, width, step divider and the
// active-low asynchronous reset (counter at 0, counting up).
//
// Outputs: carrier is the counter; up is 1 while it rises; valley pulses
// for one clock when a new carrier period starts (counter steps 1 -> 0, or
// the first step after reset).
module triangle_carrier #(
  parameter int unsigned W       = spwm_pkg::SAMPLE_W_DEF,
  parameter int unsigned CAR_DIV = spwm_pkg::CAR_DIV_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] carrier,
  output logic         up,
  output logic         valley
);

  localparam logic [W-1:0] TOP = '1;
  localparam int unsigned DIV_W = (CAR_DIV > 1) ? $clog2(CAR_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic             step;

  assign step = (div_cnt == DIV_W'(CAR_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      carrier <= '0;
      up      <= 1'b1;
    end else begin
      div_cnt <= step ? '0 : div_cnt + 1'b1;
      if (step) begin
        if (up) begin
          if (carrier == TOP - 1'b1) up <= 1'b0;
          carrier <= carrier + 1'b1;
        end else begin
          if (carrier == W'(1)) up <= 1'b1;
          carrier <= carrier - 1'b1;
        end
      end
    end
  end

  assign valley = step && !up && (carrier == W'(1));

endmodule
