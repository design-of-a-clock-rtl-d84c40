// Checks the digital loop filter: pass-through before the average state,
// max/min tracking of dithering codewords, lock after six inversions with the
// Locked Code (max + min) / 2, and the 256-cycle time-out when no inversion
// comes.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpll_dlf;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, avg_en = 1'b0, upd = 1'b0, inv = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  dco_code_t code_in = '0, code_out, locked_code;
  logic lock, timed_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adpll_dlf dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic update(logic [18:0] c, logic i);
    @(posedge clk) begin code_in <= c; upd <= 1'b1; inv <= i; end
    @(posedge clk) begin upd <= 1'b0; inv <= 1'b0; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    logic [18:0] vals[8] = '{19'd1000, 19'd1003, 19'd999, 19'd1005, 19'd1001, 19'd998, 19'd1002, 19'd1000};
    int mx = 0, mn = 1 << 20, k = 0, t0;
    #20 rst_n = 1'b1;
    @(posedge clk) code_in <= 19'd12345;
    @(posedge clk); #1;
    check(code_out == 19'd12345 && !lock, "pass-through while searching");
    avg_en = 1'b1;
    // six inversions among eight updates
    foreach (vals[i]) begin
      if (!lock) begin
        update(vals[i], i > 1);
        if (i < 7) begin
          if (int'(vals[i]) > mx) mx = vals[i];
          if (int'(vals[i]) < mn) mn = vals[i];
        end
      end
    end
    check(lock && !timed_out, "lock after six inversions");
    check(int'(locked_code) == (mx + mn) / 2, $sformatf("Locked Code %0d vs %0d", locked_code, (mx + mn) / 2));
    check(code_out == locked_code, "DCO driven by Locked Code");
    // time-out
    rst_n = 1'b0; avg_en = 1'b0; #20 rst_n = 1'b1;
    avg_en = 1'b1;
    t0 = 0;
    update(19'd500, 1'b0);
    update(19'd510, 1'b0);
    while (!lock && t0 < 400) begin @(posedge clk); t0++; end
    check(lock && timed_out, "time-out lock");
    check(t0 > 230 && t0 < 260, $sformatf("time-out after 256 cycles (%0d)", t0 + 10));
    check(locked_code == 19'd505, "time-out Locked Code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
