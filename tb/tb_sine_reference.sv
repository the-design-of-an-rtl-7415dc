// tb_sine_reference: self-checking test of the sine reference generator.
//
// Runs the generator with a 51,200 Hz clock so that one 50 Hz period is
// exactly 1,024 clocks (phase increment 2**22, four clocks per sample).
// The model here uses the full sine, not a quarter table: after e clock
// edges the output shows sample k = ((e-1) * INC >> 24) mod 256, with value
//   s = sin(2*pi*(k + 0.5)/256)
//   s >= 0: 128 + round(127 * s),   s < 0: 127 - round(127 * |s|)
// Every cycle of three periods checks the sample, its quadrant and the
// wrap pulse; the period is checked from wrap pulses, and every quadrant
// (the two mirrored ones included) must have been visited.
module tb_sine_reference;
  import spwm_pkg::*;

  localparam int unsigned CLK_HZ = 51_200;
  localparam longint INC = 64'd1 << 22;
  localparam real PI = 3.14159265358979;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ref_sample;
  quadrant_e  quadrant;
  logic       wrap;
  int checks = 0, failures = 0;
  int quad_seen [4];

  sine_reference #(.CLK_HZ(CLK_HZ)) dut (
    .clk(clk), .rst_n(rst_n), .ref_sample(ref_sample), .quadrant(quadrant), .wrap(wrap)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  function automatic int model(int k);
    real s;
    s = $sin(2.0 * PI * (k + 0.5) / 256.0);
    if (s >= 0.0) return 128 + int'($floor(127.0 * s + 0.5));
    else          return 127 - int'($floor(-127.0 * s + 0.5));
  endfunction

  initial begin
    longint ph;
    int k, last_wrap, wraps;
    last_wrap = -1;
    wraps = 0;
    foreach (quad_seen[i]) quad_seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 1; e <= 3 * 1024 + 3; e++) begin
      @(posedge clk); #1;
      ph = ((longint'(e) - 1) * INC) & 64'hFFFF_FFFF;
      k  = int'(ph >> 24);
      check(int'(ref_sample) == model(k),
            $sformatf("edge %0d sample %0d = %0d, expected %0d", e, k, ref_sample, model(k)));
      check(int'(quadrant) == k / 64, $sformatf("edge %0d quadrant %0d", e, quadrant));
      check(wrap == (ph < INC), $sformatf("edge %0d wrap=%0b", e, wrap));
      quad_seen[int'(quadrant)]++;
      if (wrap) begin
        wraps++;
        if (last_wrap >= 0) check(e - last_wrap == 1024, $sformatf("period %0d clocks", e - last_wrap));
        last_wrap = e;
      end
    end
    check(wraps == 4, $sformatf("%0d period starts seen", wraps));
    foreach (quad_seen[i]) check(quad_seen[i] >= 3 * 256, $sformatf("quadrant %0d seen %0d clocks", i, quad_seen[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
