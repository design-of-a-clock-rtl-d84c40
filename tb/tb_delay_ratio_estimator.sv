// Checks the delay ratio estimator with two ring oscillator models whose
// cell delays stand for three operating conditions (fast, typical, slow
// corners, ratios from about 0.91 to 1.01). The measured ratio must be within
// 0.1 % of D_NAND / D_BUF, valid must drop on start, the rings must start
// two cycles after start, valid must rise once the
// measurement ends, and the rings must be stopped between measurements.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_delay_ratio_estimator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic osc_en, osc_var, osc_ref, valid;
  logic [15:0] ratio;
  int checks = 0, failures = 0;
  real d_nand = 86.4, d_buf = 90.0;

  always #5000 clk = ~clk;   // 100 MHz system clock

  delay_ratio_estimator dut (.*);

  // rings with run-time delays (two-state behavioural rings)
  initial begin
    osc_var = 1'b0;
    forever begin
      wait (osc_en);
      osc_var = 1'b1;
      while (osc_en) begin #(16.0 * d_nand); osc_var = osc_en ? ~osc_var : 1'b0; end
    end
  end
  initial begin
    osc_ref = 1'b0;
    forever begin
      wait (osc_en);
      osc_ref = 1'b1;
      while (osc_en) begin #(16.0 * d_buf); osc_ref = osc_en ? ~osc_ref : 1'b0; end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(real dn, real db);
    real r, want;
    d_nand = dn; d_buf = db;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    #1 check(!valid && !osc_en, "counters cleared first");
    @(posedge clk) #1;
    check(!valid && osc_en, "rings run from the second cycle");
    wait (valid);
    r = real'(ratio) / 16384.0;
    want = dn / db;
    $display("ratio %0.5f, expected %0.5f", r, want);
    check(r > want * 0.999 && r < want * 1.001, "ratio within 0.1 %");
    #1;
    check(!osc_en, "rings stopped");
  endtask

  initial begin
    #20000 rst_n = 1'b1;
    measure(86.4, 90.0);     // typical
    measure(57.0, 62.5);     // fast
    measure(151.5, 150.0);   // slow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
