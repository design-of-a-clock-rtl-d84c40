// Behavioural model of the mapping delay line (MDL), a timing cell rather
// than synthesizable logic.
//
// The counter-based measurement samples the inverted output clock (map_out)
// with the delay-sequence strobe (map_ds). The strobe passes the delay
// generator's intrinsic delay and the output clock does not, so without
// correction the sample would land late by that amount. The MDL adds
// matching dummy delays: the strobe is delayed by DS_DLY_PS (the pulse
// generator's latch and multiplexer, which the output path passes) and the
// inverted output clock by OUT_DLY_PS (the delay generator's intrinsic delay
// plus DS_DLY_PS), so sample code c looks at the output clock c fine steps
// after its rising edge. Equal dummy paths follow the design description;
// the two delay values are parameters to be matched to the other models.
module mapping_delay_line #(
  parameter real DS_DLY_PS  = 50.0,
  parameter real OUT_DLY_PS = 550.0
) (
  input  logic ds,
  input  logic out_clk,
  output logic map_ds,
  output logic map_out
);
  timeunit 1ps;
  timeprecision 1fs;

  initial begin
    map_ds  = 1'b0;
    map_out = 1'b1;
  end

  always @(posedge ds or negedge ds) begin
    automatic logic v = ds;
    fork
      begin
        #(DS_DLY_PS) map_ds = v;
      end
    join_none
  end

  always @(posedge out_clk or negedge out_clk) begin
    automatic logic v = ~out_clk;
    fork
      begin
        #(OUT_DLY_PS) map_out = v;
      end
    join_none
  end

endmodule
