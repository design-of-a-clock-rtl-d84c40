// Digital loop filter (DLF) of the calibration ADPLL.
//
// During the search it passes the control unit's codeword straight to the
// DCO. In the average state (avg_en) the control unit dithers the second fine
// field around the target; on every codeword update the filter records the
// largest and smallest codeword seen. The state ends when the control unit
// has reported MAX_INV polarity inversions (six) or when TIMEOUT reference
// cycles (256) have passed in the average state. The filter then raises lock
// and drives the DCO with the Locked Code (max + min) / 2, which stays
// available on locked_code for the tester.
// The max/min averaging, the six inversions and the 256-cycle tap length
// follow the design description; counting the time-out from the start of the
// average state is this implementation's reading.
//
// Timing: lock rises on the reference edge after the sixth inversion or the
// time-out; code_out switches to the Locked Code on the same edge.
module adpll_dlf
  import cg_pkg::*;
#(
  parameter int unsigned MAX_INV = 6,
  parameter int unsigned TIMEOUT = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      avg_en,
  input  logic      upd,
  input  logic      inv,
  input  dco_code_t code_in,
  output dco_code_t code_out,
  output dco_code_t locked_code,
  output logic      lock,
  output logic      timed_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [CODE_W-1:0] cmax, cmin;
  logic [3:0]        ninv;
  logic [TW-1:0]     timer;
  logic              seen;
  logic [CODE_W:0]   sum;

  assign sum = {1'b0, cmax} + {1'b0, cmin};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmax        <= '0;
      cmin        <= '1;
      ninv        <= '0;
      timer       <= '0;
      seen        <= 1'b0;
      lock        <= 1'b0;
      timed_out   <= 1'b0;
      locked_code <= '0;
    end else if (avg_en && !lock) begin
      timer <= timer + 1'b1;
      if (upd) begin
        seen <= 1'b1;
        if (!seen || code_in > cmax) cmax <= code_in;
        if (!seen || code_in < cmin) cmin <= code_in;
        if (inv) ninv <= ninv + 1'b1;
      end
      if (seen && (ninv >= 4'(MAX_INV) || timer >= TW'(TIMEOUT - 1))) begin
        lock        <= 1'b1;
        timed_out   <= (ninv < 4'(MAX_INV));
        locked_code <= CODE_W'(sum >> 1);
      end
    end
  end

  assign code_out = lock ? locked_code : code_in;

endmodule
