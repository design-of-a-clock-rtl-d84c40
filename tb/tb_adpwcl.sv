// End-to-end test of the pulse width control loop.
// For input clocks of 50 MHz and 5 MHz (and 60 MHz) with a 50 % input duty
// cycle (and a 30 % one), the test starts a calibration, waits for lock,
// checks the measured period against the input period over the fine step,
// then steps the duty code through 1..9 and measures the output high time
// over several periods; each duty cycle must be within 1 % of k*10 %.
// Lock time must stay within SWEEP_DIV * period/step + 32 cycles.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpwcl;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_ext = 1'b0, clk_ecr = 1'b0, input_sel = 1'b1, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [3:0] duty_code = 4'd5;
  logic out_clk, locked, p1, overflow;
  logic [12:0] setduty, period, nowduty;
  int checks = 0, failures = 0;
  real tper = 20000.0, thigh = 10000.0;
  int cyc = 0;

  initial forever begin
    clk_ext = 1'b1; #(thigh);
    clk_ext = 1'b0; #(tper - thigh);
  end
  always @(posedge clk_ext) cyc++;

  adpwcl dut (.clk_ecrystal(clk_ecr), .*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure_duty(output real duty);
    realtime tr, tf, tr2;
    real acc = 0.0;
    repeat (2) @(posedge out_clk);
    for (int i = 0; i < 4; i++) begin
      @(posedge out_clk) tr = $realtime;
      @(negedge out_clk) tf = $realtime;
      acc += (tf - tr);
    end
    duty = acc / 4.0 / tper * 100.0;
  endtask

  task automatic run_freq(real p, real h);
    int c0;
    real duty;
    tper = p; thigh = h;
    repeat (5) @(posedge clk_ext);
    @(posedge clk_ext) start <= 1'b1;
    @(posedge clk_ext) start <= 1'b0;
    c0 = cyc;
    wait (locked == 1'b0);
    wait (locked);
    $display("T=%0.0f ps: lock after %0d cycles, period=%0d nowduty=%0d setduty=%0d",
             p, cyc - c0, period, nowduty, setduty);
    check(cyc - c0 <= 4 * int'(p / 125.0) + 32, "lock time");
    check((real'(period) * 125.0 - p) < 2.0 * 125.0 && (real'(period) * 125.0 - p) > -2.0 * 125.0,
          "measured period");
    for (int k = 1; k <= 9; k++) begin
      duty_code = 4'(k);
      repeat (8) @(posedge clk_ext);
      measure_duty(duty);
      $display("  k=%0d setduty=%0d duty=%0.2f %%", k, setduty, duty);
      check(duty > k * 10.0 - 1.0 && duty < k * 10.0 + 1.0, $sformatf("duty %0d0%%", k));
    end
    duty_code = 4'd5;
  endtask

  initial begin
    repeat (3) @(posedge clk_ext);
    rst_n = 1'b1;
    run_freq(20000.0, 10000.0);    // 50 MHz, 50 %
    run_freq(200000.0, 60000.0);   // 5 MHz, 30 % input duty
    run_freq(16667.0, 8333.0);     // 60 MHz
    check(!overflow, "no sweep overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
