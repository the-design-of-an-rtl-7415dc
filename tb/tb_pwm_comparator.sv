// tb_pwm_comparator: self-checking test of the reference/carrier comparator.
//
// Drives random and boundary pairs (equal values, 0 and full scale) and
// checks that spwm equals (reference > carrier) of the previous clock, and
// that reset clears the output.
module tb_pwm_comparator;

  localparam int W = 8;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] r, c;
  logic         spwm;
  logic         exp_q;
  int checks = 0, failures = 0;

  pwm_comparator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .ref_sample(r), .carrier(c), .spwm(spwm));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] rv, logic [W-1:0] cv);
    r = rv;
    c = cv;
    exp_q = (int'(rv) - int'(cv)) > 0;
    @(posedge clk); #1;
    checks++;
    if (spwm !== exp_q) begin
      failures++;
      $display("FAIL: ref=%0d carrier=%0d spwm=%0b", rv, cv, spwm);
    end
    @(negedge clk);
  endtask

  initial begin
    r = 8'd200; c = 8'd10;
    repeat (3) @(negedge clk);
    checks++;
    if (spwm !== 1'b0) begin failures++; $display("FAIL: spwm not 0 in reset"); end
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 256; v += 17) apply(W'(v), W'(v));       // equal: low
    apply(8'd1, 8'd0);
    apply(8'd0, 8'd1);
    apply(8'd255, 8'd254);
    apply(8'd254, 8'd255);
    apply(8'd255, 8'd0);
    apply(8'd0, 8'd255);
    for (int i = 0; i < 2000; i++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
