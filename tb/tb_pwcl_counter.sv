// Checks the sweep counter: start clears the code and raises p1, the code
// stays at 0 for 8 cycles, then steps by one every SWEEP_DIV cycles (first
// step after 8 + SWEEP_DIV cycles) with
// a tick on each step, meas_done ends the sweep, a valid setduty is loaded
// after it, and a narrow counter reports overflow when the sweep runs out.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_pwcl_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, meas_done = 1'b0, setduty_valid = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [12:0] setduty = '0, code;
  logic p1, tick, overflow;
  logic [4:0] code_s;
  logic start_s = 1'b0, p1_s, tick_s, overflow_s;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  pwcl_counter dut (.*);
  pwcl_counter #(.W(5), .SWEEP_DIV(2)) u_small (
    .clk, .rst_n, .start(start_s), .meas_done(1'b0), .setduty_valid(1'b0), .setduty(5'd0),
    .code(code_s), .p1(p1_s), .tick(tick_s), .overflow(overflow_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int c0, ticks, cyc;
    #20000 rst_n = 1'b1;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    #1 check(p1 && code == 0, "start");
    cyc = 0;
    while (code == 0) begin @(posedge clk); #1 cyc++; end
    check(cyc == 8 + 4, $sformatf("first step after %0d cycles", cyc));
    ticks = 0;
    c0 = int'(code);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk); #1;
      if (tick) ticks++;
    end
    check(int'(code) - c0 == 100 && ticks == 100, "one step per 4 cycles");
    @(posedge clk) meas_done <= 1'b1;
    @(posedge clk) meas_done <= 1'b0;
    #1 check(!p1, "meas_done ends the sweep");
    c0 = int'(code);
    repeat (20) @(posedge clk);
    #1 check(int'(code) == c0, "code holds after the sweep");
    @(posedge clk) begin setduty <= 13'd1234; setduty_valid <= 1'b1; end
    @(posedge clk) setduty_valid <= 1'b0;
    #1 check(code == 13'd1234, "setduty loaded");
    // narrow counter: 8 + 31 * 2 cycles then overflow
    @(posedge clk) start_s <= 1'b1;
    @(posedge clk) start_s <= 1'b0;
    cyc = 0;
    while (!overflow_s && cyc < 200) begin @(posedge clk); #1 cyc++; end
    check(overflow_s && !p1_s && cyc == 8 + 32 * 2, $sformatf("overflow after %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
