// Clock generator built around an embedded silicon oscillator ("eCrystal").
//
// The oscillator is the HDC-based DCO. Two loops set its 19-bit codeword:
//  - Calibration mode (cal_mode = 1), on the tester: a crystal reference
//    (xtal_clk, 5 MHz) drives the all-digital PLL, which searches the
//    codeword and produces the Locked Code. Together with the delay ratio
//    measured at the same time, Locked Codes taken at several operating
//    conditions let the tester fit the process dependent parameters a, b, c.
//  - Operation mode (cal_mode = 0), in the field, without a reference: the
//    PLL is idle, the delay ratio estimator measures R = D_NAND / D_BUF on two
//    ring oscillators and the mapper sets codeword = a*R^2 + b*R + c from the
//    PDPs held in the register file.
// The DCO output is the eCrystal clock. It, or an external clock, feeds the
// pulse width control loop, which regenerates it with a duty cycle of
// 10 % to 90 % (duty_code 1..9).
//
// The eCrystal-side control (ratio estimator, mapper, PDP registers) runs on
// the eCrystal clock itself; the PLL runs on the reference. Delay-cell values
// of the two rings stand for the operating condition and are parameters of
// the ring models. The split into blocks follows the design description; the
// mode multiplexer and the clocking of the control logic are this design's
// own choices.
module clock_generator
  import cg_pkg::*;
#(
  parameter int unsigned N_RESP      = 16,
  parameter int unsigned R_FRAC      = 14,
  parameter int unsigned RING_STAGES = 16,
  parameter real         D_BUF_PS    = 90.0,
  parameter real         D_NAND_PS   = 86.4,
  parameter int unsigned SWEEP_DIV   = 4
) (
  input  logic                 xtal_clk,
  input  logic                 rst_n,
  input  logic                 cal_mode,
  // PDP register file write port (eCrystal clock domain)
  input  logic                 pdp_we,
  input  logic [1:0]           pdp_addr,
  input  logic [31:0]          pdp_wdata,
  // delay ratio measurement request (eCrystal clock domain)
  input  logic                 ratio_start,
  // pulse width control loop
  input  logic                 clk_ext,
  input  logic                 input_sel,
  input  logic                 pwcl_start,
  input  logic [3:0]           duty_code,
  output logic                 ecrystal_clk,
  output logic                 lock,
  output dco_code_t            locked_code,
  output dco_code_t            dco_code,
  output search_state_t        pll_state,
  output logic [R_FRAC+1:0]    ratio,
  output logic                 ratio_valid,
  output logic                 map_valid,
  output logic                 out_clk,
  output logic                 pwcl_locked,
  output logic [DLY_W-1:0]     setduty,
  output logic                 pwcl_overflow,
  output logic                 pll_timed_out,  // lock came from the time-out
  output logic [DLY_W-1:0]     pwcl_period,    // measured period, delay steps
  output logic [DLY_W-1:0]     pwcl_nowduty,   // measured low phase, delay steps
  output logic                 pwcl_measuring  // sweep in progress
);
  timeunit 1ps;
  timeprecision 1fs;

  // ---------------- calibration ADPLL ----------------
  dco_code_t pll_code, map_code;
  logic      pll_dco_rst;

  adpll #(.N_RESP(N_RESP)) u_adpll (
    .ref_clk    (xtal_clk),
    .rst_n      (rst_n),
    .cal_en     (cal_mode),
    .fb_clk     (ecrystal_clk),
    .dco_code   (pll_code),
    .dco_rst    (pll_dco_rst),
    .locked_code(locked_code),
    .lock       (lock),
    .state      (pll_state),
    .trend      (),
    .polarity   (),
    .flow       (),
    .timed_out  (pll_timed_out)
  );

  // ---------------- DCO ----------------
  assign dco_code = cal_mode ? pll_code : map_code;

  hdc_dco u_dco (
    .en     (rst_n),
    .rst_dco(cal_mode ? pll_dco_rst : 1'b0),
    .code   (dco_code),
    .clk_out(ecrystal_clk)
  );

  // ---------------- delay ratio estimator and mapper ----------------
  logic osc_en, osc_nand, osc_buf;
  logic signed [31:0] pdp_a, pdp_b, pdp_c;

  ring_osc #(.STAGES(RING_STAGES), .CELL_DELAY_PS(D_NAND_PS)) u_ring_nand (
    .en(osc_en), .osc(osc_nand));
  ring_osc #(.STAGES(RING_STAGES), .CELL_DELAY_PS(D_BUF_PS)) u_ring_buf (
    .en(osc_en), .osc(osc_buf));

  delay_ratio_estimator #(.FRAC(R_FRAC)) u_dre (
    .clk    (ecrystal_clk),
    .rst_n  (rst_n),
    .start  (ratio_start),
    .osc_var(osc_nand),
    .osc_ref(osc_buf),
    .osc_en (osc_en),
    .ratio  (ratio),
    .valid  (ratio_valid)
  );

  pdp_regfile u_pdp (
    .clk  (ecrystal_clk),
    .rst_n(rst_n),
    .we   (pdp_we),
    .addr (pdp_addr),
    .wdata(pdp_wdata),
    .pdp_a(pdp_a),
    .pdp_b(pdp_b),
    .pdp_c(pdp_c)
  );

  // a new ratio is mapped once, on the cycle it becomes valid
  logic ratio_valid_d;
  always_ff @(posedge ecrystal_clk or negedge rst_n) begin
    if (!rst_n) ratio_valid_d <= 1'b0;
    else        ratio_valid_d <= ratio_valid;
  end

  mapper #(.R_FRAC(R_FRAC)) u_map (
    .clk      (ecrystal_clk),
    .rst_n    (rst_n),
    .in_valid (ratio_valid && !ratio_valid_d),
    .ratio    (ratio),
    .pdp_a    (pdp_a),
    .pdp_b    (pdp_b),
    .pdp_c    (pdp_c),
    .out_valid(map_valid),
    .code     (map_code)
  );

  // ---------------- pulse width control loop ----------------
  adpwcl #(.SWEEP_DIV(SWEEP_DIV)) u_pwcl (
    .clk_ecrystal(ecrystal_clk),
    .clk_ext     (clk_ext),
    .input_sel   (input_sel),
    .rst_n       (rst_n),
    .start       (pwcl_start),
    .duty_code   (duty_code),
    .out_clk     (out_clk),
    .locked      (pwcl_locked),
    .setduty     (setduty),
    .period      (pwcl_period),
    .nowduty     (pwcl_nowduty),
    .p1          (pwcl_measuring),
    .overflow    (pwcl_overflow)
  );

endmodule
