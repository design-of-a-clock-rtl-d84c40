// All-digital pulse width control loop (ADPWCL) with adjustable duty cycle.
//
// The output clock has the input clock's frequency and a duty cycle of
// 10 % to 90 % in steps of 10 %, set by a 4-bit code, whatever the input duty
// cycle; no look-up table is used because the loop measures the clock period
// in units of its own delay cells.
//
// Data flow. The input clock (eCrystal or external, chosen by input_sel)
// fires one-shot 1, whose pulse (SET) sets the SR latch of the pulse
// generator: every output period starts on an input rising edge. SET also
// passes the delay generator's minimum delay (Min_D.S). The input clock
// passes the swept delay generator and one-shot 2 to give the delay
// sequence D.S. The latch is reset by Min_D.S during compensation and by D.S
// afterwards.
// Compensation. start makes the counter raise P1 and sweep the delay code.
// The mapping delay line aligns D.S with the output clock, and the PVT
// compensator samples the output with the delayed strobe, recovering a
// slowed copy of it; its counters return the period and the low phase
// (nowduty) in delay steps. The auto calibration circuit turns these and the
// duty code into SETDUTY; from then on the counter holds the delay code at
// SETDUTY and the multiplexer gates the latch with D.S, so the falling edge of
// the output lands at the requested fraction of the period.
//
// Timing: locked rises about SWEEP_DIV * (period / T_FINE_PS) + 20 input
// cycles after start. A later change of duty_code is applied within four
// input cycles without a new measurement.
//
// The block list, the 10 % duty steps and the SETDUTY rule follow the design
// description; the equivalent-time sweep (SWEEP_DIV input cycles per delay
// step) is this design's own choice.
module adpwcl #(
  parameter int unsigned W          = 13,
  parameter int unsigned SWEEP_DIV  = 4,
  parameter real         T_FINE_PS  = 125.0,
  parameter real         D0_PS      = 500.0,
  parameter real         ONESHOT_PS = 300.0,
  parameter real         PG_DLY_PS  = 50.0
) (
  input  logic         clk_ecrystal,
  input  logic         clk_ext,
  input  logic         input_sel,      // 1: external clock
  input  logic         rst_n,
  input  logic         start,
  input  logic [3:0]   duty_code,
  output logic         out_clk,
  output logic         locked,
  output logic [W-1:0] setduty,
  output logic [W-1:0] period,
  output logic [W-1:0] nowduty,
  output logic         p1,
  output logic         overflow
);
  timeunit 1ps;
  timeprecision 1fs;

  logic         clk_src, set_p, min_ds, dly, ds, map_ds, map_out;
  logic         tick, meas_done;
  logic [W-1:0] code;

  assign clk_src = input_sel ? clk_ext : clk_ecrystal;

  one_shot #(.PULSE_PS(ONESHOT_PS)) u_os1 (.clk_in(clk_src), .pulse(set_p));

  std_cell_delay_line #(.D0_PS(D0_PS), .T_FINE_PS(T_FINE_PS)) u_min_dly (
    .din(set_p), .code('0), .dout(min_ds));

  std_cell_delay_line #(.D0_PS(D0_PS), .T_FINE_PS(T_FINE_PS)) u_dly (
    .din(clk_src), .code(code), .dout(dly));

  one_shot #(.PULSE_PS(ONESHOT_PS)) u_os2 (.clk_in(dly), .pulse(ds));

  pulse_generator u_pg (
    .set    (set_p),
    .min_ds (min_ds),
    .ds     (ds),
    .sel_ds (locked),
    .rst_n  (rst_n),
    .out_clk(out_clk)
  );

  mapping_delay_line #(.DS_DLY_PS(PG_DLY_PS), .OUT_DLY_PS(D0_PS + PG_DLY_PS)) u_mdl (
    .ds(ds), .out_clk(out_clk), .map_ds(map_ds), .map_out(map_out));

  pwcl_counter #(.W(W), .SWEEP_DIV(SWEEP_DIV)) u_cnt (
    .clk          (clk_src),
    .rst_n        (rst_n),
    .start        (start),
    .meas_done    (meas_done),
    .setduty_valid(locked),
    .setduty      (setduty),
    .code         (code),
    .p1           (p1),
    .tick         (tick),
    .overflow     (overflow)
  );

  pvt_compensator #(.W(W)) u_pvt (
    .clk    (clk_src),
    .rst_n  (rst_n),
    .p1     (p1),
    .tick   (tick),
    .map_ds (map_ds),
    .map_out(map_out),
    .period (period),
    .nowduty(nowduty),
    .done   (meas_done),
    .maskall(),
    .maskmin()
  );

  pwcl_acc #(.W(W)) u_acc (
    .clk          (clk_src),
    .rst_n        (rst_n),
    .restart      (start),
    .meas_valid   (meas_done),
    .period       (period),
    .nowduty      (nowduty),
    .duty_code    (duty_code),
    .setduty      (setduty),
    .setduty_valid(locked),
    .busy         ()
  );

endmodule
