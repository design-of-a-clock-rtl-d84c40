// Checks the PDP register file: reset to zero, each word written at its
// address, address 3 ignored, no write without we.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_pdp_regfile;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [1:0] addr = '0;
  logic [31:0] wdata = '0;
  logic signed [31:0] pdp_a, pdp_b, pdp_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pdp_regfile dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [1:0] a, logic [31:0] d, logic w);
    @(posedge clk) begin we <= w; addr <= a; wdata <= d; end
    @(posedge clk) we <= 1'b0;
    #1;
  endtask

  initial begin
    logic [31:0] va, vb, vc;
    #20 rst_n = 1'b1;
    check(pdp_a == 0 && pdp_b == 0 && pdp_c == 0, "reset");
    for (int i = 0; i < 10; i++) begin
      va = $urandom; vb = $urandom; vc = $urandom;
      wr(2'd0, va, 1'b1); wr(2'd1, vb, 1'b1); wr(2'd2, vc, 1'b1);
      check(pdp_a == va && pdp_b == vb && pdp_c == vc, "written words");
      wr(2'd3, ~va, 1'b1);
      wr(2'd0, ~va, 1'b0);
      check(pdp_a == va && pdp_b == vb && pdp_c == vc, "no spurious write");
    end
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
