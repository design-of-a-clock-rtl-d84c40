// Counter of the pulse width control loop (13 bits).
//
// It drives the delay generator's code. A start pulse raises P1, which
// enables the PVT compensator, and clears the code; the code then sweeps
// upward by one fine step every SWEEP_DIV input clock cycles, with tick
// marking each new step (after HOLD = 8 cycles at code zero that let the
// sample path settle), so that the delay-sequence strobe slides across the
// output clock period (equivalent-time sampling). When the compensator
// reports that it has measured the period (meas_done), P1 falls and the code
// holds; once the calibration circuit presents SETDUTY (setduty_valid) the
// code follows SETDUTY. If the code reaches its maximum before the
// measurement ends, overflow is raised and the sweep stops (the input clock
// is slower than the line can cover).
// The counter's role, P1 and the 13-bit width follow the design description;
// stepping every SWEEP_DIV cycles (four by default) rather than every cycle
// is this implementation's choice: it lets the sampled value pass its
// synchronisers before the next step, at the cost of a longer lock time.
module pwcl_counter #(
  parameter int unsigned W         = 13,
  parameter int unsigned SWEEP_DIV = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         meas_done,
  input  logic         setduty_valid,
  input  logic [W-1:0] setduty,
  output logic [W-1:0] code,
  output logic         p1,
  output logic         tick,
  output logic         overflow
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned DW = (SWEEP_DIV > 1) ? $clog2(SWEEP_DIV) : 1;
  localparam int unsigned HOLD = 8;   // cycles at code 0 before the sweep
  logic [DW-1:0] div;
  logic [3:0]    hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code     <= '0;
      p1       <= 1'b0;
      tick     <= 1'b0;
      div      <= '0;
      hold     <= '0;
      overflow <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (start) begin
        code     <= '0;
        p1       <= 1'b1;
        div      <= '0;
        hold     <= 4'(HOLD);
        overflow <= 1'b0;
      end else if (p1) begin
        if (meas_done) begin
          p1 <= 1'b0;
        end else if (hold != '0) begin
          hold <= hold - 1'b1;
        end else if (div == DW'(SWEEP_DIV - 1)) begin
          div <= '0;
          if (code == '1) begin
            overflow <= 1'b1;
            p1       <= 1'b0;
          end else begin
            code <= code + 1'b1;
            tick <= 1'b1;
          end
        end else begin
          div <= div + 1'b1;
        end
      end else if (setduty_valid) begin
        code <= setduty;
      end
    end
  end

endmodule
