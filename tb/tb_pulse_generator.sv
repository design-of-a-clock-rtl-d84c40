// Checks the output latch: reset clears it, set raises it and wins over a
// simultaneous reset pulse, the selected reset input (min_ds before lock, ds
// after) lowers it, and the other reset input is ignored.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_pulse_generator;
  timeunit 1ps;
  timeprecision 1fs;

  logic set = 1'b0, min_ds = 1'b0, ds = 1'b0, sel_ds = 1'b0, rst_n = 1'b1, out_clk;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  int checks = 0, failures = 0;

  pulse_generator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  initial begin
    set = 1'b1; #10;
    check(out_clk == 1'b0, "reset wins");
    set = 1'b0; #10;
    rst_n = 1'b1; #10;
    check(out_clk == 1'b0, "low after reset");
    for (int sel = 0; sel < 2; sel++) begin
      sel_ds = sel[0];
      set = 1'b1; #300; set = 1'b0; #300;
      check(out_clk == 1'b1, "set raises");
      if (sel == 0) begin ds = 1'b1; #300; ds = 1'b0; #300; end
      else begin min_ds = 1'b1; #300; min_ds = 1'b0; #300; end
      check(out_clk == 1'b1, "unselected reset ignored");
      if (sel == 0) begin min_ds = 1'b1; #300; min_ds = 1'b0; #300; end
      else begin ds = 1'b1; #300; ds = 1'b0; #300; end
      check(out_clk == 1'b0, "selected reset lowers");
      set = 1'b1; if (sel == 0) min_ds = 1'b1; else ds = 1'b1; #300;
      check(out_clk == 1'b1, "set dominates");
      set = 1'b0; #10;
      check(out_clk == 1'b0, "reset acts once set ends");
      min_ds = 1'b0; ds = 1'b0; #300;
    end
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
