// Behavioural model of the one-shot circuit, a timing cell rather than
// synthesizable logic. The input is delayed by a buffer of PULSE_PS (the
// delta-t of the design) and the inverted, delayed copy gates the input, so
// each rising input edge produces an output pulse PULSE_PS wide whatever the
// input duty cycle is (as long as the input stays high for longer than that).
// The gate-level arrangement is abstracted to this AND-with-delayed-inverse
// behaviour; the pulse width default is this model's choice.
module one_shot #(
  parameter real PULSE_PS = 300.0
) (
  input  logic clk_in,
  output logic pulse
);
  timeunit 1ps;
  timeprecision 1fs;

  logic in_dly;

  initial in_dly = 1'b0;

  always @(posedge clk_in or negedge clk_in) begin
    automatic logic v = clk_in;
    automatic real  d = PULSE_PS;
    fork
      begin
        #(d) in_dly = v;
      end
    join_none
  end

  assign pulse = clk_in & ~in_dly;

endmodule
