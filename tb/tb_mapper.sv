// Checks the mapper against code = a*R^2 + b*R + c computed exactly in
// 64-bit integers for random ratios and PDPs (rounded to nearest, clamped to
// the 19-bit range), its two-cycle latency, and clamping at both ends.
//
// The expected behaviour is that of the design description; the stimulus,
// the tolerances and the watchdog limit are this testbench's own choices.
module tb_mapper;
  timeunit 1ps;
  timeprecision 1fs;
  import cg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid;
  initial #1 rst_n = 1'b0;   // a falling edge, so every reset flop sees it
  logic [15:0] ratio = '0;
  logic signed [31:0] pdp_a = '0, pdp_b = '0, pdp_c = '0;
  dco_code_t code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mapper dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(int ra, int a, int b, int c);
    longint total, w;
    @(posedge clk) begin ratio <= 16'(ra); pdp_a <= a; pdp_b <= b; pdp_c <= c; in_valid <= 1'b1; end
    @(posedge clk) in_valid <= 1'b0;
    #1 check(!out_valid, "not valid after one cycle");
    @(posedge clk) #1;
    check(out_valid, "valid after two cycles");
    // exact reference: scale to 2*14 + 8 fractional bits, round half up
    total = longint'(a) * ra * ra + longint'(b) * ra * 16384 + longint'(c) * 268435456;
    w = (total + (64'sd1 <<< 35)) >>> 36;
    if (w < 0) w = 0;
    if (w > 524287) w = 524287;
    check(longint'(code) == w,
          $sformatf("R=%0d/16384 code %0d, expected %0d", ra, code, w));
  endtask

  initial begin
    #20 rst_n = 1'b1;
    one(15729, 20000 * 256, -15000 * 256, 50000 * 256);
    one(16384, 0, 0, 63188 * 256);
    for (int i = 0; i < 40; i++)
      one(14900 + int'($urandom_range(0, 1800)), int'($urandom_range(0, 2000000)) - 1000000,
          int'($urandom_range(0, 2000000)) - 1000000, int'($urandom_range(0, 60000000)));
    one(16000, 0, 0, -5000);                  // clamps to 0
    check(code == '0, "clamp low");
    one(16000, 0, 0, 32'h7fff_ffff);          // clamps to max
    check(code == '1, "clamp high");
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
