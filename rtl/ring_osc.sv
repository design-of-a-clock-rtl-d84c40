// Behavioural model of a ring oscillator made of identical delay cells, as
// used by the delay ratio estimator (one ring of NAND cells, one of BUFFER
// cells). This is a timing model of a physical cell chain, not synthesizable
// logic. The oscillation period is 2 * STAGES * CELL_DELAY_PS; the cell delay
// stands for the process, voltage and temperature condition being modelled.
// en low stops the ring with its output low; raising en restarts it with a
// rising edge.
//
// The two cell types follow the design description; the stage count and the
// cell delays are this model's own choices.
module ring_osc #(
  parameter int unsigned STAGES        = 16,
  parameter real         CELL_DELAY_PS = 80.0
) (
  input  logic en,
  output logic osc
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real HALF_PS = real'(STAGES) * CELL_DELAY_PS;

  initial begin
    osc = 1'b0;
    forever begin
      wait (en);
      osc = 1'b1;
      while (en) begin
        #(HALF_PS);
        osc = en ? ~osc : 1'b0;
      end
    end
  end

endmodule
