// Checks the mapping delay line model: map_ds follows ds after 50 ps,
// map_out follows the inverted output clock after 550 ps.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_mapping_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  logic ds = 1'b0, out_clk = 1'b0, map_ds, map_out;
  int checks = 0, failures = 0;

  mapping_delay_line dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    check(map_ds == 1'b0 && map_out == 1'b1, "initial levels");
    for (int i = 0; i < 6; i++) begin
      ds = ~ds;
      out_clk = ~out_clk;
      #49;  check(map_ds != ds, "map_ds not before 50 ps");
      #2;   check(map_ds == ds, "map_ds after 50 ps");
      #498; check(map_out == out_clk, "map_out not before 550 ps");
      #2;   check(map_out == ~out_clk, "map_out inverted after 550 ps");
      #1000;
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
