// Mapper of the embedded oscillator.
//
// Turns the measured delay ratio R into the DCO control code with the
// second-order fit found at calibration,
//     code = a * R^2 + b * R + c,
// where a, b and c are the process dependent parameters (PDPs) fitted by the
// tester from Locked Codes taken at several operating conditions. R arrives
// as unsigned fixed point with R_FRAC fractional bits; a, b and c are signed
// with P_FRAC fractional bits (fractions of one code step). The result is
// rounded to the nearest code and clamped to the 19-bit codeword range.
// The quadratic form follows the design description; the number formats and
// the two-stage pipeline are this implementation's choices.
//
// Timing: out_valid follows in_valid two clock cycles later.
module mapper
  import cg_pkg::*;
#(
  parameter int unsigned R_FRAC = 14,
  parameter int unsigned R_W    = R_FRAC + 2,
  parameter int unsigned P_W    = 32,
  parameter int unsigned P_FRAC = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [R_W-1:0]        ratio,
  input  logic signed [P_W-1:0] pdp_a,
  input  logic signed [P_W-1:0] pdp_b,
  input  logic signed [P_W-1:0] pdp_c,
  output logic                  out_valid,
  output dco_code_t             code
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SQ_W = 2 * R_W;
  localparam int unsigned ACC_W = P_W + SQ_W + 2;

  // stage 1: R^2 and b*R
  logic                    v1;
  logic [SQ_W-1:0]         r2;      // 2*R_FRAC fractional bits
  logic signed [ACC_W-1:0] br;      // R_FRAC + P_FRAC fractional bits

  // stage 2: sum
  logic signed [ACC_W+R_FRAC-1:0] asq;
  logic signed [ACC_W+R_FRAC-1:0] total;
  logic signed [ACC_W+R_FRAC-1:0] rounded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      r2  <= '0;
      br  <= '0;
    end else begin
      v1  <= in_valid;
      r2  <= ratio * ratio;
      br  <= ACC_W'(pdp_b) * $signed({1'b0, ratio});
    end
  end

  // everything scaled to 2*R_FRAC + P_FRAC fractional bits
  always_comb begin
    asq     = (ACC_W + R_FRAC)'(pdp_a) * $signed({1'b0, r2});
    total   = asq + ((ACC_W + R_FRAC)'(br) <<< R_FRAC)
                  + ((ACC_W + R_FRAC)'(pdp_c) <<< (2 * R_FRAC));
    rounded = (total + ((ACC_W + R_FRAC)'(1) <<< (2 * R_FRAC + P_FRAC - 1)))
              >>> (2 * R_FRAC + P_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      code      <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        if (rounded < 0)                                         code <= '0;
        else if (rounded > (ACC_W + R_FRAC)'((1 << CODE_W) - 1)) code <= '1;
        else                                                     code <= dco_code_t'(rounded[CODE_W-1:0]);
      end
    end
  end

endmodule
