// Pulse width control loop at the fast and slow process corners.
// Two loops run from the same 50 MHz, 50 % input clock: one with the
// fast-corner fine delay step of 85.4 ps and one with the slow-corner step
// of 222 ps (the typical 125 ps is covered by the loop's own test). For each
// corner the test starts a calibration and checks the lock time
// (SWEEP_DIV * period/step + 32 cycles) and the measured period (input
// period over the step, within two steps). It then checks all nine duty
// settings. The allowed duty error is 1 % plus one delay step, because at
// the slow corner a single step is already 1.1 % of the 20 ns period.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpwcl_corners;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TPER = 20000.0;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [1:0] start = '0;
  logic [3:0] duty_code = 4'd5;
  logic [1:0] out_clk, locked, p1, overflow;
  logic [12:0] setduty [2], period [2], nowduty [2];
  int checks = 0, failures = 0, cyc = 0;

  always #(TPER / 2.0) clk = ~clk;
  always @(posedge clk) cyc++;

  adpwcl #(.T_FINE_PS(85.4)) u_ff (
    .clk_ecrystal(1'b0), .clk_ext(clk), .input_sel(1'b1), .rst_n, .start(start[0]),
    .duty_code, .out_clk(out_clk[0]), .locked(locked[0]), .setduty(setduty[0]),
    .period(period[0]), .nowduty(nowduty[0]), .p1(p1[0]), .overflow(overflow[0]));

  adpwcl #(.T_FINE_PS(222.0)) u_ss (
    .clk_ecrystal(1'b0), .clk_ext(clk), .input_sel(1'b1), .rst_n, .start(start[1]),
    .duty_code, .out_clk(out_clk[1]), .locked(locked[1]), .setduty(setduty[1]),
    .period(period[1]), .nowduty(nowduty[1]), .p1(p1[1]), .overflow(overflow[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure_duty(int i, output real duty);
    realtime tr, tf;
    real acc = 0.0;
    repeat (2) @(posedge out_clk[i]);
    for (int n = 0; n < 4; n++) begin
      @(posedge out_clk[i]) tr = $realtime;
      @(negedge out_clk[i]) tf = $realtime;
      acc += (tf - tr);
    end
    duty = acc / 4.0 / TPER * 100.0;
  endtask

  task automatic corner(int i, real step, string name);
    int c0, steps;
    real duty, tol;
    steps = int'(TPER / step);
    tol = 1.0 + step / TPER * 100.0;
    @(posedge clk) start[i] <= 1'b1;
    @(posedge clk) start[i] <= 1'b0;
    c0 = cyc;
    #1;
    check(!locked[i], {name, ": lock cleared by start"});
    wait (locked[i]);
    $display("%s corner: lock after %0d cycles, period=%0d nowduty=%0d", name, cyc - c0,
             period[i], nowduty[i]);
    check(cyc - c0 <= 4 * steps + 32, {name, ": lock time"});
    check(int'(period[i]) >= steps - 2 && int'(period[i]) <= steps + 2, {name, ": measured period"});
    for (int k = 1; k <= 9; k++) begin
      duty_code = 4'(k);
      repeat (8) @(posedge clk);
      measure_duty(i, duty);
      $display("  k=%0d setduty=%0d duty=%0.2f %%", k, setduty[i], duty);
      check(duty > k * 10.0 - tol && duty < k * 10.0 + tol, $sformatf("%s: duty %0d0%%", name, k));
    end
    duty_code = 4'd5;
    check(!overflow[i], {name, ": no sweep overflow"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    corner(0, 85.4, "fast");
    corner(1, 222.0, "slow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
