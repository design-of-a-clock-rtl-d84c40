// Checks the auto-calibration arithmetic: SETDUTY = round(k * period / 10)
// - (period - nowduty), clamped at 0, valid exactly 4 cycles after the
// measurement, recomputed when the duty code changes, k limited to 1..9, and
// cleared by restart.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_pwcl_acc;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, restart = 1'b0, meas_valid = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [12:0] period = '0, nowduty = '0, setduty;
  logic [3:0] duty_code = 4'd5;
  logic setduty_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwcl_acc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expect_code(int p, int n, int k);
    int kk = (k == 0) ? 1 : (k > 9 ? 9 : k);
    int v = (p * kk + 5) / 10 - (p - n);
    return v < 0 ? 0 : v;
  endfunction

  task automatic wait_valid(int want_cycles, string what);
    int cyc = 0;
    while (!setduty_valid && cyc < 20) begin @(posedge clk); #1 cyc++; end
    check(cyc == want_cycles, $sformatf("%s latency %0d", what, cyc));
  endtask

  initial begin
    int p, n, k;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      p = int'($urandom_range(100, 1700));
      n = p - int'($urandom_range(4, p / 10));
      k = int'($urandom_range(1, 9));
      duty_code = 4'(k);
      @(posedge clk) begin period <= 13'(p); nowduty <= 13'(n); meas_valid <= 1'b1; end
      @(posedge clk) meas_valid <= 1'b0;
      #1 check(!setduty_valid && busy, "busy after a measurement");
      wait_valid(4, "measurement");
      check(int'(setduty) == expect_code(p, n, k),
            $sformatf("P=%0d now=%0d k=%0d -> %0d", p, n, k, setduty));
      k = (k % 9) + 1;
      @(posedge clk) duty_code <= 4'(k);
      @(posedge clk);
      #1 check(!setduty_valid || busy || int'(setduty) == expect_code(p, n, k), "duty change");
      while (busy) @(posedge clk);
      #1 check(setduty_valid && int'(setduty) == expect_code(p, n, k), "recomputed for new k");
    end
    // clamping of k and of the result
    duty_code = 4'd0;
    @(posedge clk) begin period <= 13'd1000; nowduty <= 13'd800; meas_valid <= 1'b1; end
    @(posedge clk) meas_valid <= 1'b0;
    #1 wait_valid(4, "clamp");
    check(setduty == 13'd0, "k=0 treated as 1, result clamped at 0");
    duty_code = 4'd15;
    repeat (8) @(posedge clk);
    #1 check(setduty == 13'd700, "k=15 treated as 9");
    @(posedge clk) restart <= 1'b1;
    @(posedge clk) restart <= 1'b0;
    #1 check(!setduty_valid, "restart clears valid");
    duty_code = 4'd3;
    repeat (8) @(posedge clk);
    #1 check(!setduty_valid, "no result without a measurement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
