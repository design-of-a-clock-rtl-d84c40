// Behavioural model of the phase frequency detector of the calibration ADPLL.
// It models a full-custom timing circuit and is not synthesizable logic.
//
// Two edge-triggered flags record the rising edges of the reference (IN) and
// of the DCO feedback (FB). When both have arrived the pair is complete: the
// flags are cleared, as the reset branch of the real detector does, and the
// result is registered on the outputs:
//   up = 1, dn = 0  FB lags IN (DCO too slow: raise its frequency)
//   up = 0, dn = 1  FB leads IN (DCO too fast: lower its frequency)
//   up = 1, dn = 1  the edges were closer than DEAD_ZONE_PS (about 8 ps in the
//                   typical corner): no correction is requested.
// The delay buffer in the reset branch and the pulse amplifiers that widen
// the detector pulses are represented by this explicit dead zone rather than
// by gates. While clr is high both flags are held clear and edges are
// ignored; rst_n clears the outputs too. rst_n and clr are both edge events
// (clearing) and levels (blocking edges), as in the real flip-flops, which
// lint reports as a signal used both synchronously and asynchronously.
//
// The three-way verdict and the 8 ps dead zone follow the design
// description; registering the verdict once per edge pair is this model's
// own choice.
module adpll_pfd #(
  parameter real DEAD_ZONE_PS = 8.0
) (
  input  logic rst_n,
  input  logic clr,
  input  logic in_clk,
  input  logic fb_clk,
  output logic up,
  output logic dn
);
  timeunit 1ps;
  timeprecision 1fs;

  logic    qu, qd;
  realtime t_in, t_fb;

  initial begin
    qu   = 1'b0;
    qd   = 1'b0;
    t_in = 0.0;
    t_fb = 0.0;
    up = 1'b0;
    dn = 1'b0;
  end

  task automatic decide();
    realtime lag;
    lag = t_fb - t_in;
    if (lag > DEAD_ZONE_PS) begin
      up = 1'b1; dn = 1'b0;
    end else if (lag < -DEAD_ZONE_PS) begin
      up = 1'b0; dn = 1'b1;
    end else begin
      up = 1'b1; dn = 1'b1;
    end
    qu = 1'b0;
    qd = 1'b0;
  endtask

  always @(posedge in_clk) begin
    if (!clr && rst_n && !qu) begin
      qu   = 1'b1;
      t_in = $realtime;
      if (qd) decide();
    end
  end

  always @(posedge fb_clk) begin
    if (!clr && rst_n && !qd) begin
      qd   = 1'b1;
      t_fb = $realtime;
      if (qu) decide();
    end
  end

  always @(posedge clr or negedge rst_n) begin
    qu = 1'b0;
    qd = 1'b0;
    if (!rst_n) begin
      up = 1'b0;
      dn = 1'b0;
    end
  end

endmodule
