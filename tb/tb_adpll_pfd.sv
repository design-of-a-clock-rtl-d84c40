// Checks the phase frequency detector model: FB lagging IN gives up only,
// FB leading gives dn only, a phase error inside the 8 ps dead zone gives
// both, clr makes it ignore edges, and rst_n clears the outputs.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_adpll_pfd;
  timeunit 1ps;
  timeprecision 1fs;

  logic rst_n = 1'b1, clr = 1'b0, in_clk = 1'b0, fb_clk = 1'b0, up, dn;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  int checks = 0, failures = 0;

  adpll_pfd dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one rising edge on each input, FB offset by off ps (positive = later)
  task automatic pair(real off);
    if (off >= 0.0) begin
      in_clk = 1'b1; #(off); fb_clk = 1'b1;
    end else begin
      fb_clk = 1'b1; #(-off); in_clk = 1'b1;
    end
    #1000;
    in_clk = 1'b0; fb_clk = 1'b0;
    #1000;
  endtask

  initial begin
    #100;
    check(up == 1'b0 && dn == 1'b0, "reset outputs");
    rst_n = 1'b1;
    pair(500.0);   check(up == 1'b1 && dn == 1'b0, "FB lags: up");
    pair(-500.0);  check(up == 1'b0 && dn == 1'b1, "FB leads: dn");
    pair(20.0);    check(up == 1'b1 && dn == 1'b0, "20 ps lag: up");
    pair(5.0);     check(up == 1'b1 && dn == 1'b1, "5 ps: dead zone");
    pair(-12.0);   check(up == 1'b0 && dn == 1'b1, "12 ps lead: dn");
    pair(-3.0);    check(up == 1'b1 && dn == 1'b1, "-3 ps: dead zone");
    // cleared: edges ignored, outputs keep the last verdict
    pair(500.0);   check(up == 1'b1 && dn == 1'b0, "up again");
    clr = 1'b1;
    pair(-500.0);  check(up == 1'b1 && dn == 1'b0, "clr ignores edges");
    clr = 1'b0;
    // a lone IN edge followed by a pair: the lone edge is paired with the next FB
    in_clk = 1'b1; #100; in_clk = 1'b0; #100;
    fb_clk = 1'b1; #100; fb_clk = 1'b0; #100;
    check(up == 1'b1 && dn == 1'b0, "IN then FB 200 ps later: up");
    rst_n = 1'b0; #10;
    check(up == 1'b0 && dn == 1'b0, "rst_n clears");
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
