// End-to-end test of the clock generator at its default parameters.
//  1. Calibration mode: a 5 MHz crystal reference; the PLL must lock within
//     608 reference cycles with a Locked Code within 20 ppm of the reference
//     period, passing the coarse, fine and average search states. A delay
//     ratio measurement runs meanwhile.
//  2. The test plays the tester: it fits PDPs to the Locked Code and the
//     measured ratio (a and b chosen, c solved) and writes them.
//  3. Operation mode: the reference is removed; the mapper sets the DCO from
//     a new ratio measurement, and the free-running eCrystal clock must be
//     within 20 ppm of 5 MHz.
//  4. The pulse width control loop takes the eCrystal clock, locks, and
//     measures the 200 ns period as 1600 delay steps, produces 30 % and
//     70 % duty cycles within 1 %; then it is switched to a
//     50 MHz external clock and produces 90 %.
// Each mechanism (search states, dead-zone stage ends, mode switch, ratio
// measurement, mapping, PWCL lock, duty recomputation, input switch) is
// counted and must occur at least once.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_clock_generator;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  localparam real TREF = 200000.0;

  logic xtal_clk = 1'b0, rst_n = 1'b1, cal_mode = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic pdp_we = 1'b0; logic [1:0] pdp_addr = '0; logic [31:0] pdp_wdata = '0;
  logic ratio_start = 1'b0;
  logic clk_ext = 1'b0, input_sel = 1'b0, pwcl_start = 1'b0;
  logic [3:0] duty_code = 4'd3;
  logic ecrystal_clk, lock, ratio_valid, map_valid, out_clk, pwcl_locked, pwcl_overflow;
  dco_code_t locked_code, dco_code;
  search_state_t pll_state;
  logic [15:0] ratio;
  logic [12:0] setduty, pwcl_period, pwcl_nowduty;
  logic pll_timed_out, pwcl_measuring;

  int checks = 0, failures = 0;
  int n_state[5];
  int n_deadzone = 0, n_mode = 0, n_ratio = 0, n_map = 0, n_pwlock = 0, n_recalc = 0, n_insel = 0;
  int cycles = 0;
  bit xtal_on = 1'b1;

  always #(TREF / 2.0) if (xtal_on) xtal_clk = ~xtal_clk;
  always #(10000.0) clk_ext = ~clk_ext;     // 50 MHz

  clock_generator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge xtal_clk) if (rst_n && cal_mode) begin
    cycles++;
    n_state[int'(pll_state)]++;
  end
  always @(posedge dut.u_adpll.u_cu.upd) if (dut.u_adpll.u_cu.dz) n_deadzone++;
  always @(posedge ratio_valid) n_ratio++;
  always @(posedge map_valid) n_map++;
  always @(posedge pwcl_locked) n_pwlock++;

  function automatic real period_of(dco_code_t c);
    return 4180.0 + real'(c.coarse) * 987.0 + real'(c.fine1) * 62.9 + real'(c.fine2) * 2.04;
  endfunction

  task automatic measure_period(input logic which, output real p);
    realtime t0, t1;
    if (which) begin
      @(posedge out_clk) t0 = $realtime; repeat (8) @(posedge out_clk); t1 = $realtime;
    end else begin
      @(posedge ecrystal_clk) t0 = $realtime; repeat (8) @(posedge ecrystal_clk); t1 = $realtime;
    end
    p = (t1 - t0) / 8.0;
  endtask

  task automatic measure_duty(output real d);
    realtime tr, tf, t2;
    @(posedge out_clk) tr = $realtime;
    @(negedge out_clk) tf = $realtime;
    @(posedge out_clk) t2 = $realtime;
    d = (tf - tr) / (t2 - tr) * 100.0;
  endtask

  task automatic start_ratio();
    @(posedge ecrystal_clk) ratio_start <= 1'b1;
    @(posedge ecrystal_clk) ratio_start <= 1'b0;
  endtask

  task automatic start_pwcl_ecr();
    @(posedge ecrystal_clk) pwcl_start <= 1'b1;
    @(posedge ecrystal_clk) pwcl_start <= 1'b0;
  endtask

  task automatic write_pdp(input logic [1:0] a, input logic [31:0] v);
    @(posedge ecrystal_clk) begin pdp_we <= 1'b1; pdp_addr <= a; pdp_wdata <= v; end
    @(posedge ecrystal_clk) pdp_we <= 1'b0;
  endtask

  initial begin
    real p, err, r, a_r, b_r, c_r, d;
    int  a_q, b_q, c_q;
    repeat (3) @(posedge xtal_clk);
    rst_n = 1'b1;

    // ---- 1. calibration ----
    repeat (4) @(posedge xtal_clk);
    start_ratio();
    wait (lock);
    $display("PLL lock after %0d reference cycles, Locked Code %0d/%0d/%0d",
             cycles, locked_code.coarse, locked_code.fine1, locked_code.fine2);
    check(cycles <= 608, "PLL lock time");
    err = (period_of(locked_code) - TREF) / TREF * 1e6;
    check(err < 20.0 && err > -20.0, "Locked Code within 20 ppm");
    measure_period(1'b0, p);
    err = (p - TREF) / TREF * 1e6;
    $display("calibrated eCrystal period %0.3f ps (%0.2f ppm)", p, err);
    check(err < 20.0 && err > -20.0, "calibrated DCO within 20 ppm");
    wait (ratio_valid);
    r = real'(ratio) / 16384.0;
    $display("delay ratio %0.5f (cells %0.1f / %0.1f ps)", r, 86.4, 90.0);
    check(r > 0.96 * 0.999 && r < 0.96 * 1.001, "delay ratio within 0.1 %");

    // ---- 2. tester fits PDPs: code = a R^2 + b R + c (Q.8) ----
    a_r = 20000.0; b_r = -15000.0;
    c_r = real'(locked_code) - a_r * r * r - b_r * r;
    a_q = int'(a_r * 256.0); b_q = int'(b_r * 256.0); c_q = int'(c_r * 256.0);
    write_pdp(2'd0, a_q);
    write_pdp(2'd1, b_q);
    write_pdp(2'd2, c_q);

    // ---- 3. operation mode ----
    @(posedge xtal_clk) cal_mode = 1'b0;
    n_mode++;
    xtal_on = 1'b0;
    start_ratio();
    wait (!ratio_valid);
    wait (map_valid);
    repeat (4) @(posedge ecrystal_clk);
    $display("mapper code %h (Locked Code %h)", dco_code, locked_code);
    check(dco_code == locked_code || dco_code == locked_code + 1 || dco_code == locked_code - 1,
          "mapper reproduces the Locked Code");
    measure_period(1'b0, p);
    err = (p - TREF) / TREF * 1e6;
    $display("free-running eCrystal period %0.3f ps (%0.2f ppm)", p, err);
    check(err < 20.0 && err > -20.0, "free-running eCrystal within 20 ppm");

    // ---- 4. pulse width control loop on the eCrystal clock ----
    start_pwcl_ecr();
    wait (pwcl_locked);
    repeat (8) @(posedge ecrystal_clk);
    measure_duty(d);
    $display("eCrystal clock, duty code 3: %0.2f %% (setduty %0d)", d, setduty);
    // the sweep measures the 200 ns eCrystal period in 125 ps delay steps
    $display("measured period %0d steps, nowduty %0d", pwcl_period, pwcl_nowduty);
    check(pwcl_period >= 13'd1598 && pwcl_period <= 13'd1602, "period = 200 ns / 125 ps");
    check(d > 29.0 && d < 31.0, "30 % duty on eCrystal clock");
    duty_code = 4'd7;
    n_recalc++;
    repeat (10) @(posedge ecrystal_clk);
    measure_duty(d);
    $display("eCrystal clock, duty code 7: %0.2f %% (setduty %0d)", d, setduty);
    check(d > 69.0 && d < 71.0, "70 % duty on eCrystal clock");

    // external 50 MHz clock
    input_sel = 1'b1;
    n_insel++;
    duty_code = 4'd9;
    @(posedge clk_ext) pwcl_start <= 1'b1;
    @(posedge clk_ext) pwcl_start <= 1'b0;
    wait (!pwcl_locked);
    wait (pwcl_locked);
    repeat (10) @(posedge clk_ext);
    measure_duty(d);
    measure_period(1'b1, p);
    $display("external clock, duty code 9: %0.2f %%, period %0.1f ps", d, p);
    check(d > 89.0 && d < 91.0, "90 % duty on external clock");
    check(p > 19990.0 && p < 20010.0, "output follows the input period");
    check(!pwcl_overflow, "no sweep overflow");

    // mechanisms
    check(n_state[0] > 0 && n_state[1] > 0 && n_state[2] > 0 && n_state[3] > 0, "all PLL states");
    check(n_deadzone > 0, "dead-zone stage end");
    check(n_mode > 0, "mode switch");
    check(n_ratio >= 2, "ratio measurements");
    check(n_map > 0, "mapper update");
    check(n_pwlock >= 2, "PWCL locks");
    check(n_recalc > 0 && n_insel > 0, "duty recomputation and input switch");
    $display("mechanisms: states %0d/%0d/%0d/%0d deadzone %0d mode %0d ratio %0d map %0d pwlock %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_deadzone, n_mode, n_ratio, n_map, n_pwlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
