// All-digital PLL for process calibration of the embedded oscillator.
//
// The reference (a crystal clock on the test machine, 5 MHz) and the DCO
// feedback enter the phase frequency detector; the control unit turns its
// verdicts into a binary search of the 19-bit DCO codeword and the digital
// loop filter averages the final dither into the Locked Code. The DCO itself
// is outside this module (it is shared with the free-running oscillator):
// dco_code and dco_rst drive it and fb_clk comes back from it.
// cal_en low gates the loop off (the operation mode); the DCO is then driven
// from elsewhere.
//
// Timing: one codeword update every N_RESP reference cycles; lock rises when
// the loop filter has finished averaging (within about 600 reference cycles
// at the default sizes).
//
// The PFD/CU/DLF split, the 19-bit codeword and the binary search follow
// the design description; N_RESP, MAX_INV and TIMEOUT are this design's
// own choices.
module adpll
  import cg_pkg::*;
#(
  parameter int unsigned N_RESP       = 16,
  parameter int unsigned MAX_INV      = 6,
  parameter int unsigned TIMEOUT      = 256,
  parameter real         DEAD_ZONE_PS = 8.0
) (
  input  logic          ref_clk,
  input  logic          rst_n,
  input  logic          cal_en,
  input  logic          fb_clk,
  output dco_code_t     dco_code,
  output logic          dco_rst,
  output dco_code_t     locked_code,
  output logic          lock,
  output search_state_t state,
  output trend_t        trend,
  output polarity_t     polarity,
  output flow_t         flow,
  output logic          timed_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic      up, dn, pfd_clr, upd, inv;
  dco_code_t cu_code;

  adpll_pfd #(.DEAD_ZONE_PS(DEAD_ZONE_PS)) u_pfd (
    .rst_n (rst_n),
    .clr   (pfd_clr),
    .in_clk(ref_clk),
    .fb_clk(fb_clk),
    .up    (up),
    .dn    (dn)
  );

  adpll_cu #(.N_RESP(N_RESP)) u_cu (
    .clk     (ref_clk),
    .rst_n   (rst_n),
    .en      (cal_en),
    .up      (up),
    .dn      (dn),
    .lock_in (lock),
    .code    (cu_code),
    .dco_rst (dco_rst),
    .pfd_clr (pfd_clr),
    .upd     (upd),
    .inv     (inv),
    .state   (state),
    .trend   (trend),
    .polarity(polarity),
    .flow    (flow)
  );

  adpll_dlf #(.MAX_INV(MAX_INV), .TIMEOUT(TIMEOUT)) u_dlf (
    .clk        (ref_clk),
    .rst_n      (rst_n),
    .avg_en     (state == ST_AVG),
    .upd        (upd),
    .inv        (inv),
    .code_in    (cu_code),
    .code_out   (dco_code),
    .locked_code(locked_code),
    .lock       (lock),
    .timed_out  (timed_out)
  );

endmodule
