// Checks the ADPLL control unit against an ideal detector: a hidden target
// codeword, and up/dn computed from whether the current codeword is above or
// below it (dead zone when equal). The search must reach the target in the
// coarse, first fine and second fine fields, update every N_RESP cycles,
// reset to the mid codeword, start each field at a quarter of its range,
// report the trend/polarity/flow encodings of cg_pkg and saturate at a field end.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpll_cu;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b1, up, dn, lock_in = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  dco_code_t code;
  logic dco_rst, pfd_clr, upd, inv;
  search_state_t state;
  trend_t trend; polarity_t polarity; flow_t flow;
  int checks = 0, failures = 0;
  dco_code_t target;
  int last_upd = -1, cyc = 0, n_inv = 0, n_under = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  adpll_cu dut (.*);

  // larger code = slower DCO: code above target -> too slow -> up
  always_comb begin
    if (code > target)      begin up = 1'b1; dn = 1'b0; end
    else if (code < target) begin up = 1'b0; dn = 1'b1; end
    else                    begin up = 1'b1; dn = 1'b1; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (upd) begin
    if (last_upd >= 0 && state != ST_AVG) check(cyc - last_upd == 16, "16-cycle update period");
    last_upd = cyc;
    if (polarity == POL_SLOW_TO_FAST || polarity == POL_FAST_TO_SLOW) n_inv++;
    if (flow == FLOW_UNDER) n_under++;
  end

  task automatic run(dco_code_t t);
    target = t;
    last_upd = -1;
    rst_n = 1'b0;
    #20;
    check(code == '{8'd128, 5'd16, 6'd32}, "reset codeword at mid range");
    check(trend == TREND_INIT && polarity == POL_INIT && flow == FLOW_INIT, "initial status encodings");
    check(dut.step == 7'd64, "coarse step n/4");
    rst_n = 1'b1;
    wait (state == ST_FINE1);
    check(code.coarse == t.coarse, $sformatf("coarse %0d vs %0d", code.coarse, t.coarse));
    @(posedge clk) #1 check(dut.step == 7'd8, "fine1 step 32/4");
    wait (state == ST_FINE2);
    check(code.fine1 == t.fine1, $sformatf("fine1 %0d vs %0d", code.fine1, t.fine1));
    @(posedge clk) #1 check(dut.step == 7'd16, "fine2 step 64/4");
    wait (state == ST_AVG);
    check(code.fine2 == t.fine2, $sformatf("fine2 %0d vs %0d", code.fine2, t.fine2));
    repeat (40) @(posedge clk);
    lock_in = 1'b1;
    @(posedge clk); #1;
    lock_in = 1'b0;
    check(state == ST_LOCKED, "locked on lock_in");
    repeat (40) @(posedge clk);
    check(!upd && !dco_rst, "no updates after lock");
  endtask

  initial begin
    run('{8'd198, 5'd6, 6'd8});
    run('{8'd37, 5'd25, 6'd50});
    run('{8'd0, 5'd0, 6'd0});       // every field ends at its lower end
    check(n_inv > 0, "polarity inversions reported");
    check(n_under > 0, "underflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
