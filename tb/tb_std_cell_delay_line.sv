// Checks the standard-cell delay line model: delay D0 + code * T_FINE for
// fine, coarse and mixed codes on both edges, and that pulses shorter than
// the delay pass through unchanged (several edges in flight).
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_std_cell_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  logic din = 1'b0, dout;
  logic [12:0] code = '0;
  int checks = 0, failures = 0;

  std_cell_delay_line dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic edge_delay(logic [12:0] c);
    realtime t0, want;
    code = c;
    #100;
    want = 500.0 + 125.0 * real'(c);
    t0 = $realtime; din = ~din;
    @(dout);
    check($realtime - t0 > want - 0.01 && $realtime - t0 < want + 0.01,
          $sformatf("code %0d delay %0.1f ps", c, $realtime - t0));
    #100;
  endtask

  initial begin
    realtime t0;
    int n;
    #1000;
    edge_delay(13'd0);    edge_delay(13'd0);
    edge_delay(13'd1);    edge_delay(13'd31);
    edge_delay(13'd32);   edge_delay(13'd33);
    edge_delay(13'd1600); edge_delay(13'd1601);
    edge_delay(13'd8191); edge_delay(13'd8190);
    // a 1 ns pulse train through a 100 ns line
    code = 13'd796;
    #200_000;
    n = 0;
    fork
      repeat (20) begin din = 1'b1; #1000; din = 1'b0; #1000; end
      begin
        t0 = $realtime;
        repeat (20) begin
          @(posedge dout);
          if ($realtime - t0 - real'(n) * 2000.0 > 100000.0 - 0.01 &&
              $realtime - t0 - real'(n) * 2000.0 < 100000.0 + 0.01) n++;
        end
      end
    join
    check(n == 20, "all pulses kept their timing");
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
