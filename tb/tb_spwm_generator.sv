// tb_spwm_generator: end-to-end test of the SPWM generator at its default
// sizes (50 MHz clock, 50 Hz sine, 8-bit samples, ~4.9 kHz carrier).
//
// Simulates one full sine period (about 1,000,000 clocks) plus a margin and
// checks, every clock, the reference, the carrier and the spwm output
// against a model built here from the full sine and the triangle formula:
//   after e clock edges: sample k = ((e-1) * 4295 >> 24) mod 256,
//   carrier step p = (e / 20) mod 510, spwm(e) = ref(e-1) > carrier(e-1).
// It then checks what SPWM is for:
//   - the duty cycle in every carrier period follows the reference
//     (for a held reference r a triangle gives duty (2r-1)/510);
//   - over one sine period, the 50 Hz Fourier component of the +/-1 switched
//     waveform is close to full scale and in phase with the sine;
//   - the sine period is 2**32 / 4295 clocks (999,992 or 999,993).
// Each mechanism must occur: all four quadrants (two read the quarter table
// backwards, two give the negative half), carrier peaks and valleys, spwm
// pulses and a period wrap.
module tb_spwm_generator;
  import spwm_pkg::*;

  localparam longint INC     = 4295;          // round(50 * 2**32 / 50e6)
  localparam int     CAR_DIV = 20;
  localparam int     STEPS   = 510;
  localparam real    PI      = 3.14159265358979;
  localparam int     EDGES   = 1_000_020;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       spwm, ref_wrap, carrier_up, carrier_valley;
  logic [7:0] ref_sample, carrier;
  quadrant_e  quadrant;
  int checks = 0, failures = 0;
  int table_v [256];
  int quad_seen [4];

  spwm_generator dut (
    .clk(clk), .rst_n(rst_n), .spwm(spwm), .ref_sample(ref_sample), .quadrant(quadrant),
    .ref_wrap(ref_wrap), .carrier(carrier), .carrier_up(carrier_up),
    .carrier_valley(carrier_valley)
  );

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int ref_at(int e);
    longint ph, n;
    n  = (e > 0) ? longint'(e) - 1 : 0;
    ph = (n * INC) & 64'hFFFF_FFFF;
    return table_v[int'(ph >> 24)];
  endfunction

  function automatic int car_at(int e);
    int p;
    p = (e / CAR_DIV) % STEPS;
    return (p <= STEPS / 2) ? p : STEPS - p;
  endfunction

  initial begin
    int   r, c, last_wrap, wraps, peaks, valleys, pulses, period;
    int   hi_in_car, clk_in_car, car_periods, duty_bad;
    bit   prev_spwm, in_period;
    real  exp_duty_sum, duty, a_sin, a_cos;
    longint n0;

    for (int k = 0; k < 256; k++) begin
      real s;
      s = $sin(2.0 * PI * (k + 0.5) / 256.0);
      table_v[k] = (s >= 0.0) ? 128 + int'($floor(127.0 * s + 0.5))
                              : 127 - int'($floor(-127.0 * s + 0.5));
    end
    foreach (quad_seen[i]) quad_seen[i] = 0;
    last_wrap = -1; wraps = 0; peaks = 0; valleys = 0; pulses = 0; period = 0;
    hi_in_car = 0; clk_in_car = 0; car_periods = 0; duty_bad = 0;
    exp_duty_sum = 0.0; a_sin = 0.0; a_cos = 0.0; n0 = 0;
    prev_spwm = 1'b0; in_period = 1'b0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 1; e <= EDGES; e++) begin
      @(posedge clk); #1;
      r = ref_at(e);
      c = car_at(e);
      check(int'(ref_sample) == r, $sformatf("edge %0d ref=%0d expected %0d", e, ref_sample, r));
      check(int'(carrier) == c, $sformatf("edge %0d carrier=%0d expected %0d", e, carrier, c));
      check(spwm == (ref_at(e - 1) > car_at(e - 1)), $sformatf("edge %0d spwm=%0b", e, spwm));
      quad_seen[int'(quadrant)]++;
      if (carrier == 8'hFF && carrier_up == 1'b0 && (e % CAR_DIV) == 0) peaks++;
      if (spwm && !prev_spwm) pulses++;
      prev_spwm = spwm;

      // Duty cycle per carrier period, valley to valley.
      hi_in_car += spwm;
      clk_in_car++;
      exp_duty_sum += (2.0 * r - 1.0) / 510.0;
      if (carrier_valley) begin
        valleys++;
        if (valleys > 1) begin
          duty = real'(hi_in_car) / clk_in_car;
          car_periods++;
          checks++;
          if ((duty - exp_duty_sum / clk_in_car) > 0.02 || (exp_duty_sum / clk_in_car - duty) > 0.02) begin
            failures++;
            duty_bad++;
            if (duty_bad < 10) $display("FAIL: carrier period %0d duty %f expected %f",
                                        car_periods, duty, exp_duty_sum / clk_in_car);
          end
        end
        hi_in_car = 0; clk_in_car = 0; exp_duty_sum = 0.0;
      end

      // Sine period and its 50 Hz Fourier component.
      if (ref_wrap) begin
        wraps++;
        if (last_wrap >= 0) begin
          period = e - last_wrap;
          check(period == 999_992 || period == 999_993, $sformatf("sine period %0d clocks", period));
          in_period = 1'b0;
        end else begin
          in_period = 1'b1;
          n0 = longint'(e);
        end
        last_wrap = e;
      end
      if (in_period) begin
        real th;
        th = 2.0 * PI * real'(longint'(e) - n0) * real'(INC) / 4294967296.0;
        a_sin += (spwm ? 1.0 : -1.0) * $sin(th);
        a_cos += (spwm ? 1.0 : -1.0) * $cos(th);
      end
    end

    a_sin = 2.0 * a_sin / period;
    a_cos = 2.0 * a_cos / period;
    $display("fundamental: in phase %f, quadrature %f; %0d carrier periods, %0d spwm pulses",
             a_sin, a_cos, car_periods, pulses);
    check(a_sin > 0.95 && a_sin < 1.02, $sformatf("in-phase 50 Hz amplitude %f", a_sin));
    check(a_cos < 0.05 && a_cos > -0.05, $sformatf("quadrature 50 Hz amplitude %f", a_cos));

    // Every mechanism must have happened.
    foreach (quad_seen[i]) check(quad_seen[i] > 200_000, $sformatf("quadrant %0d seen %0d clocks", i, quad_seen[i]));
    check(wraps == 2, $sformatf("%0d sine period starts", wraps));
    check(peaks >= 95, $sformatf("%0d carrier peaks", peaks));
    check(car_periods >= 95, $sformatf("%0d whole carrier periods", car_periods));
    check(pulses >= 95, $sformatf("%0d spwm pulses", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
