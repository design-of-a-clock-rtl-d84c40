// Checks the HDC-DCO model: the period for several codewords against
// T = 4180 + 987*coarse + 62.9*fine1 + 2.04*fine2 ps, the extremes of the
// range (239 MHz and 3.89 MHz), the stop while rst_dco is high and the
// restart with a rising edge at the moment of release.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_hdc_dco;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  logic en = 1'b0, rst_dco = 1'b1, clk_out;
  dco_code_t code = '0;
  int checks = 0, failures = 0;

  hdc_dco dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic try_code(dco_code_t c);
    realtime t0, t1;
    real expect_p;
    code = c;
    expect_p = 4180.0 + 987.0 * real'(c.coarse) + 62.9 * real'(c.fine1) + 2.04 * real'(c.fine2);
    #1000;
    rst_dco = 1'b1;
    #1000;
    rst_dco = 1'b0;
    t0 = $realtime;
    #1;
    check(clk_out == 1'b1, "rising edge at release");
    repeat (4) @(posedge clk_out);
    t1 = $realtime;
    check((t1 - t0) / 4.0 > expect_p - 0.01 && (t1 - t0) / 4.0 < expect_p + 0.01,
          $sformatf("period for code %h: %f vs %f", c, (t1 - t0) / 4.0, expect_p));
  endtask

  initial begin
    #100;
    check(clk_out == 1'b0, "stopped while disabled");
    en = 1'b1;
    #500;
    check(clk_out == 1'b0, "stopped while rst_dco");
    try_code('{8'd0, 5'd0, 6'd0});
    try_code('{8'd198, 5'd6, 6'd8});
    try_code('{8'd255, 5'd31, 6'd63});
    try_code('{8'd10, 5'd17, 6'd41});
    try_code('{8'd100, 5'd0, 6'd1});
    rst_dco = 1'b1;
    #300000;
    check(clk_out == 1'b0, "held low in reset");
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
