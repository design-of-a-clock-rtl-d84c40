// Pulse generator of the pulse width control loop: an SR latch and a 2-to-1
// multiplexer.
//
// The one-shot pulse on set starts every output high phase. The latch is
// reset by the gating pulse: during compensation (sel_ds = 0) the minimum
// delay sequence min_ds, which gives a short pulse of fixed width; after
// calibration (sel_ds = 1) the delay sequence ds, delayed by SETDUTY steps,
// which places the falling edge for the desired duty cycle. The latch is
// set-dominant so that a reset pulse that overlaps the set pulse cannot cut
// it short. The structure follows the design description; set dominance is
// this implementation's choice.
//
// The latch is intentional: this is an asynchronous pulse-shaping cell.
module pulse_generator (
  input  logic set,
  input  logic min_ds,
  input  logic ds,
  input  logic sel_ds,
  input  logic rst_n,
  output logic out_clk
);
  timeunit 1ps;
  timeprecision 1fs;

  logic gated;
  assign gated = sel_ds ? ds : min_ds;

  always_latch begin
    if (!rst_n)     out_clk = 1'b0;
    else if (set)   out_clk = 1'b1;
    else if (gated) out_clk = 1'b0;
  end

endmodule
