// Checks the one-shot model: one pulse of PULSE_PS per rising input edge,
// nothing on falling edges, for several input periods and duty cycles.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_one_shot;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0, pulse;
  int checks = 0, failures = 0, rises = 0;
  realtime t_rise;

  one_shot #(.PULSE_PS(300.0)) dut (.*);

  always @(posedge pulse) begin rises++; t_rise = $realtime; end
  always @(negedge pulse) if (rises > 0) begin
    checks++;
    if ($realtime - t_rise < 299.9 || $realtime - t_rise > 300.1) begin
      failures++;
      $display("FAIL: pulse width %0.1f ps", $realtime - t_rise);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int n, real hi, real lo);
    int r0 = rises;
    repeat (n) begin
      clk_in = 1'b1; #(hi);
      check(pulse == 1'b0, "pulse over before the falling edge");
      clk_in = 1'b0; #(lo);
    end
    check(rises - r0 == n, "one pulse per rising edge");
  endtask

  initial begin
    #1000;
    run(5, 10000.0, 10000.0);    // 50 MHz, 50 %
    run(5, 2000.0, 18000.0);     // 10 % duty
    run(5, 90000.0, 10000.0);    // 10 MHz, 90 %
    run(5, 8333.0, 8333.0);      // 60 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
