// Closed-loop test of the calibration ADPLL with the HDC-DCO model.
// A 5 MHz reference drives the loop from reset. The test checks that lock
// rises within the worst-case lock time of 608 reference cycles, that the
// search passed through the coarse, first fine, second fine and average
// states, and that the Locked Code puts the DCO model within 20 ppm of the
// reference period (computed here from the model's period formula). It then
// measures the running DCO period after lock.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpll;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  localparam real TREF = 200000.0;   // 5 MHz

  logic ref_clk = 1'b0, rst_n = 1'b1, cal_en = 1'b1, fb_clk;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  dco_code_t dco_code, locked_code;
  logic dco_rst, lock, timed_out;
  search_state_t state;
  trend_t trend; polarity_t polarity; flow_t flow;
  int checks = 0, failures = 0;
  int cycles = 0;
  bit seen [5];

  always #(TREF / 2.0) ref_clk = ~ref_clk;

  adpll dut (.*);
  hdc_dco u_dco (.en(cal_en), .rst_dco(dco_rst), .code(dco_code), .clk_out(fb_clk));

  function automatic real model_period(dco_code_t c);
    return 4180.0 + real'(c.coarse) * 987.0 + real'(c.fine1) * 62.9 + real'(c.fine2) * 2.04;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge ref_clk) if (rst_n) begin
    cycles++;
    seen[int'(state)] = 1'b1;
  end

  initial begin
    realtime t0, t1;
    real err_ppm, p;
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    wait (lock);
    $display("lock after %0d reference cycles, code=%h (c=%0d f1=%0d f2=%0d) timed_out=%0d",
             cycles, locked_code, locked_code.coarse, locked_code.fine1, locked_code.fine2, timed_out);
    check(cycles <= 608, "lock within 608 reference cycles");
    check(seen[0] && seen[1] && seen[2] && seen[3], "all search states visited");
    p = model_period(locked_code);
    err_ppm = (p - TREF) / TREF * 1.0e6;
    $display("locked period %f ps, error %f ppm", p, err_ppm);
    check(err_ppm < 20.0 && err_ppm > -20.0, "Locked Code within 20 ppm");
    check(dco_code == locked_code, "DCO driven by the Locked Code");
    repeat (4) @(posedge ref_clk);
    @(posedge fb_clk) t0 = $realtime;
    repeat (10) @(posedge fb_clk);
    t1 = $realtime;
    check(((t1 - t0) / 10.0 - TREF) / TREF * 1.0e6 < 20.0 && ((t1 - t0) / 10.0 - TREF) / TREF * 1.0e6 > -20.0,
          "measured DCO period within 20 ppm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 2000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
