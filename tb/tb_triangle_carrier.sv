// tb_triangle_carrier: self-checking test of the triangular carrier.
//
// After reset the counter takes one step every CAR_DIV clocks, so after e
// clock edges it has made s = e / CAR_DIV steps and, with p = s mod 510,
//   carrier = p <= 255 ? p : 510 - p,  up = (p < 255)
// valley must be high exactly in the clock before the step that lands on 0.
// Every cycle of three carrier periods is compared with that model, at the
// default divider; the period (10,200 clocks) is checked from valley pulses.
module tb_triangle_carrier;

  localparam int W       = 8;
  localparam int CAR_DIV = 20;
  localparam int STEPS   = 2 * ((1 << W) - 1);

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] carrier;
  logic         up, valley;
  int checks = 0, failures = 0;

  triangle_carrier dut (.clk(clk), .rst_n(rst_n), .carrier(carrier), .up(up), .valley(valley));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  initial begin
    int p, exp_c, last_valley, peaks;
    bit exp_valley;
    last_valley = -1;
    peaks = 0;
    repeat (2) @(negedge clk);
    check(carrier == 0 && up, "reset state");
    rst_n = 1'b1;
    for (int e = 1; e <= 3 * STEPS * CAR_DIV + 5; e++) begin
      @(posedge clk); #1;
      p = (e / CAR_DIV) % STEPS;
      exp_c = (p <= STEPS / 2) ? p : STEPS - p;
      exp_valley = ((e + 1) % CAR_DIV == 0) && (p == STEPS - 1);
      check(int'(carrier) == exp_c, $sformatf("edge %0d carrier=%0d expected %0d", e, carrier, exp_c));
      check(up == (p < STEPS / 2), $sformatf("edge %0d up=%0b", e, up));
      check(valley == exp_valley, $sformatf("edge %0d valley=%0b", e, valley));
      if (carrier == '1) peaks++;
      if (valley) begin
        if (last_valley >= 0)
          check(e - last_valley == STEPS * CAR_DIV,
                $sformatf("carrier period %0d clocks", e - last_valley));
        last_valley = e;
      end
    end
    check(peaks == 3 * CAR_DIV, $sformatf("carrier reached full scale for %0d clocks", peaks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
