// tb_sine_quarter_rom: self-checking test of the quarter-wave sine table.
//
// Reads every entry and compares it with a value worked out here from the
// cosine of the complementary angle, rounded to nearest:
//   expected[k] = round(127 * cos(pi/2 - pi*(2k+1)/256))
// It also checks the one-clock read latency (the old value must still be
// on the output before the clock edge) and the mirror property the rest of
// the generator relies on: the table never decreases.
module tb_sine_quarter_rom;

  localparam int QADDR_W = 6;
  localparam int MAG_W   = 7;
  localparam int DEPTH   = 2 ** QADDR_W;

  logic               clk = 1'b0;
  logic [QADDR_W-1:0] addr;
  logic [MAG_W-1:0]   mag;
  int checks = 0, failures = 0;

  sine_quarter_rom #(.QADDR_W(QADDR_W), .MAG_W(MAG_W)) dut (
    .clk(clk), .addr(addr), .mag(mag)
  );

  always #5 clk = ~clk;

  function automatic int expected(int k);
    real x;
    x = 127.0 * $cos(3.14159265358979 / 2.0 - 3.14159265358979 * (2.0 * k + 1.0) / 256.0);
    return int'($floor(x + 0.5));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    addr = '0;
    @(negedge clk);
    prev = -1;
    for (int k = 0; k < DEPTH; k++) begin
      addr = QADDR_W'(k);
      @(posedge clk);
      #1;
      check(int'(mag) == expected(k),
            $sformatf("entry %0d = %0d, expected %0d", k, mag, expected(k)));
      check(int'(mag) >= prev, $sformatf("entry %0d below entry %0d", k, k - 1));
      prev = int'(mag);
      @(negedge clk);
    end
    // Latency: change the address mid-cycle; output holds until the edge.
    addr = 0;
    @(posedge clk); #1;
    @(negedge clk);
    addr = QADDR_W'(DEPTH - 1);
    #2;
    check(int'(mag) == expected(0), "output changed before the clock edge");
    @(posedge clk); #1;
    check(int'(mag) == expected(DEPTH - 1), "output not updated one clock after address");
    check(int'(mag) == 127, "last entry is not full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
