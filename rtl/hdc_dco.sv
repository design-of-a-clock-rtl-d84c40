// Behavioural model of the hysteresis-delay-cell (HDC) digitally controlled
// oscillator. This is a timing model of an analog/full-custom ring oscillator,
// not synthesizable logic.
//
// The ring holds three tuning stages: a coarse stage of very-large and large
// HDCs selected by multiplexers (8 bits), a first fine stage of medium and
// small HDCs (5 bits) and a second fine stage of switched MOS gate capacitors
// (6 bits). The model turns the 19-bit codeword into an output period
//   T = T_MIN + coarse*RES_C + fine1*RES_F1 + fine2*RES_F2
// so a larger code gives a slower clock. The defaults are the typical-corner
// (TT, 1.0 V, 25 C) resolutions of the design: 987 ps, 62.9 ps and 2.04 ps per
// step, with a 4.18 ns minimum period (239 MHz) and about 258 ns at the
// largest code (3.89 MHz). Treating every stage as linear and the stage
// resolutions as steps of the full period is this model's simplification.
//
// Interface: while en is high and rst_dco low the ring runs. Raising rst_dco
// stops it (output low, as the real ring is broken by the gating AND gate);
// releasing rst_dco restarts it with a rising edge at the moment of release,
// so a restart made on a reference edge starts the DCO in phase with it.
// The code is read at every half period.
module hdc_dco
  import cg_pkg::*;
#(
  parameter real T_MIN_PS  = 4180.0,
  parameter real RES_C_PS  = 987.0,
  parameter real RES_F1_PS = 62.9,
  parameter real RES_F2_PS = 2.04
) (
  input  logic      en,
  input  logic      rst_dco,
  input  dco_code_t code,
  output logic      clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  // Every start or stop bumps the generation number; an oscillation process
  // of an older generation ends at its next half period without touching the
  // output, so a stop takes effect at once.
  int unsigned gen;

  function automatic real period_ps(input dco_code_t c);
    return T_MIN_PS + real'(c.coarse) * RES_C_PS + real'(c.fine1) * RES_F1_PS
           + real'(c.fine2) * RES_F2_PS;
  endfunction

  initial begin
    gen     = 0;
    clk_out = 1'b0;
  end

  always @(posedge rst_dco or negedge rst_dco or posedge en or negedge en) begin
    gen     = gen + 1;
    clk_out = 1'b0;
    if (en && !rst_dco) begin
      automatic int unsigned my_gen = gen;
      clk_out = 1'b1;
      fork
        begin
          while (gen == my_gen) begin
            #(period_ps(code) / 2.0);
            if (gen == my_gen) clk_out = ~clk_out;
          end
        end
      join_none
    end
  end

endmodule
