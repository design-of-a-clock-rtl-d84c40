// Checks the PVT compensator with an abstract equivalent-time source: on
// sweep step n the recovered sample is the inverted output clock at phase
// (n + OFF) mod P steps, where the output is high for the first H steps of
// each period. The compensator must report period = P - OFF (steps from
// the start of the sweep to the next rising output edge) and nowduty = P - H
// (the low phase), with done pulsing once; a second sweep must give fresh
// results.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_pvt_compensator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, p1 = 1'b0, tick = 1'b0, map_ds = 1'b0, map_out = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [12:0] period, nowduty;
  logic done, maskall, maskmin;
  int checks = 0, failures = 0;
  int n = 0, p_steps = 40, h_steps = 12, off = 1, dones = 0;

  always #5000 clk = ~clk;

  // one sample per clock, 3 ns after the clock edge; like the delay line, a
  // new step only reaches the sample taken on the following clock edge
  int n_prev = 0;
  always @(posedge clk) begin
    #3000;
    map_out = (((n_prev + off) % p_steps) >= h_steps);
    n_prev = n;
    #100 map_ds = 1'b1;
    #1000 map_ds = 1'b0;
  end

  always @(posedge clk) if (done) dones++;

  pvt_compensator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sweep(int p, int h, int o);
    int d0 = dones;
    p_steps = p; h_steps = h; off = o;
    @(posedge clk) begin p1 <= 1'b1; n = 0; end
    repeat (8) @(posedge clk);
    while (dones == d0 && n < 4 * p) begin
      repeat (3) @(posedge clk);
      tick <= 1'b1; n = n + 1;
      @(posedge clk) tick <= 1'b0;
    end
    @(posedge clk) p1 <= 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check(dones - d0 == 1, "one done per sweep");
    check(int'(period) == p - o, $sformatf("period %0d, expected %0d", period, p - o));
    check(int'(nowduty) == p - h, $sformatf("nowduty %0d, expected %0d", nowduty, p - h));
    check(!maskall && !maskmin, "masks closed");
  endtask

  initial begin
    #20000 rst_n = 1'b1;
    sweep(40, 12, 1);
    sweep(133, 67, 2);
    sweep(400, 40, 3);
    sweep(160, 150, 1);
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
