// PVT compensator of the pulse width control loop: a counter-based
// time-to-digital converter.
//
// The strobe map_ds (the delay sequence after the mapping delay line) samples
// map_out (the inverted output clock after the mapping delay line). As the
// counter sweeps the delay code upward, the sampled signal "recovery" traces
// the inverted output clock in slow motion: low while the sample point lies in
// the output's high phase, high in its low phase, low again once the sample
// point has passed one full period. recovery is brought into the input clock
// domain through two flops and watched by edge detectors.
//   maskall: high from P1 (start of the sweep) to the falling edge of
//            recovery that follows a rising edge - spans one whole period.
//   maskmin: high from that rising edge to the same falling edge - spans the
//            low phase of the output clock.
// On every sweep step (tick) two counters add one while their mask is high,
// so "period" is the output period and "nowduty" its low phase, both in fine
// delay steps. done pulses when the falling edge ends the measurement.
// The signals and counters follow the design description; gating the counts
// with the sweep step is this implementation's choice.
//
// Timing: done comes a few input clock cycles after the sweep passes one
// output period; the results then hold until the next P1.
module pvt_compensator #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         p1,
  input  logic         tick,
  input  logic         map_ds,
  input  logic         map_out,
  output logic [W-1:0] period,
  output logic [W-1:0] nowduty,
  output logic         done,
  output logic         maskall,
  output logic         maskmin
);
  timeunit 1ps;
  timeprecision 1fs;

  // sampler in the strobe domain
  logic rec_raw;
  always_ff @(posedge map_ds or negedge rst_n) begin
    if (!rst_n) rec_raw <= 1'b0;
    else        rec_raw <= map_out;
  end

  // synchroniser and edge detectors in the input clock domain
  logic [2:0] rec_sync;
  logic [2:0] tick_d;
  logic       rec_rise, rec_fall, p1_d, seen_rise, armed;

  // tick_d[2] marks the sweep step whose sample is just reaching the edge
  // detectors (strobe flight plus the synchroniser), so counts and edges
  // refer to the same delay code.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_sync <= '0;
      tick_d   <= '0;
      p1_d     <= 1'b0;
    end else begin
      rec_sync <= {rec_sync[1:0], rec_raw};
      tick_d   <= {tick_d[1:0], tick};
      p1_d     <= p1;
    end
  end

  assign rec_rise = rec_sync[1] & ~rec_sync[2];
  assign rec_fall = ~rec_sync[1] & rec_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      maskall   <= 1'b0;
      maskmin   <= 1'b0;
      seen_rise <= 1'b0;
      armed     <= 1'b0;
      period    <= '0;
      nowduty   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (p1 && !p1_d) begin
        maskall   <= 1'b1;
        maskmin   <= 1'b0;
        seen_rise <= 1'b0;
        armed     <= 1'b0;
        period    <= '0;
        nowduty   <= '0;
      end else if (maskall) begin
        if (tick_d[2]) begin
          armed  <= 1'b1;
          period <= period + 1'b1;
          if (maskmin) nowduty <= nowduty + 1'b1;
        end
        if (!armed) begin
          // samples taken before the sweep settled are ignored
        end else if (rec_rise) begin
          seen_rise <= 1'b1;
          maskmin   <= 1'b1;
        end else if (rec_fall && seen_rise) begin
          maskall <= 1'b0;
          maskmin <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

endmodule
