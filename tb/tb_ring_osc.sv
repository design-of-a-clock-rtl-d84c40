// Checks the ring oscillator model: period 2 * STAGES * CELL_DELAY_PS while
// enabled, output low and still while disabled, restart with a rising edge.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_ring_osc;
  timeunit 1ps;
  timeprecision 1fs;

  logic en = 1'b0, osc;
  int checks = 0, failures = 0, n = 0;

  ring_osc #(.STAGES(16), .CELL_DELAY_PS(90.0)) dut (.*);

  always @(posedge osc) n++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    realtime t0, t1;
    #1000;
    check(osc == 1'b0 && n == 0, "still while disabled");
    en = 1'b1;
    #1;
    check(osc == 1'b1, "starts with a rising edge");
    t0 = $realtime - 1;
    repeat (10) @(posedge osc);
    t1 = $realtime;
    check((t1 - t0) / 10.0 > 2879.9 && (t1 - t0) / 10.0 < 2880.1, "period 2*16*90 ps");
    en = 1'b0;
    #3000;
    n = 0;
    #10000;
    check(osc == 1'b0 && n == 0, "stopped after disable");
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
