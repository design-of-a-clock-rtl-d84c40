// Delay ratio estimator of the embedded oscillator.
//
// Estimates R = D_var / D_ref, the delay of a NAND-type delay cell over the
// delay of a BUFFER-type cell, which tracks the process, voltage and
// temperature condition of the die. Both cell types form ring oscillators
// (outside this module) of the same number of stages. On start the module
// enables both rings and lets each drive a counter. When the NAND-ring
// counter reaches 2^FRAC cycles, the BUFFER-ring counter is frozen; since
// the BUFFER ring runs faster by the factor R, its count is R in unsigned
// fixed point with FRAC fractional bits. No divider is needed.
//
// The estimator's purpose and output follow the design description; the
// counting method is this implementation's own, as the description gives
// no circuit. The stop flag crosses into the BUFFER-ring domain through a
// two-flop synchroniser, which costs a few counts (about 3 / 2^FRAC, 0.02 %
// at FRAC = 14, inside the 0.1 % the estimator must reach). The result is
// handed to the system clock through another two-flop synchroniser.
//
// Timing: start clears both counters on the next cycle and enables the
// rings on the one after. valid rises a few system clock cycles after the BUFFER counter
// stops, about 2^FRAC NAND-ring periods after start, and stays high until
// the next start. The rings stay enabled only while a measurement runs.
// clr is an asynchronous clear for the ring-clock counters and, in its own
// clock domain, the one-cycle step before run rises; lint reports it as used
// both ways, which is intended.
module delay_ratio_estimator #(
  parameter int unsigned FRAC = 14,
  parameter int unsigned R_W  = FRAC + 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,     // one-cycle pulse, system clock
  input  logic           osc_var,   // NAND ring
  input  logic           osc_ref,   // BUFFER ring
  output logic           osc_en,
  output logic [R_W-1:0] ratio,
  output logic           valid
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [R_W-1:0] ref_cnt;    // BUFFER-ring counter
  logic           ref_done;

  // ---- system clock domain: run control ----
  // start raises clr for one cycle (clears both ring-domain counters, whose
  // clocks are stopped at that time), then run enables the rings.
  logic run, clr;
  logic [1:0] ref_done_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run           <= 1'b0;
      clr           <= 1'b0;
      valid         <= 1'b0;
      ratio         <= '0;
      ref_done_sync <= '0;
    end else begin
      ref_done_sync <= {ref_done_sync[0], ref_done};
      clr           <= start;
      if (start) begin
        run           <= 1'b0;
        valid         <= 1'b0;
        ref_done_sync <= '0;
      end else if (clr) begin
        run <= 1'b1;
      end else if (run && ref_done_sync[1]) begin
        run   <= 1'b0;
        valid <= 1'b1;
        ratio <= ref_cnt;      // frozen and stable by now
      end
    end
  end

  assign osc_en = run;

  // ---- NAND ring domain: counts 2^FRAC cycles ----
  logic [FRAC:0] var_cnt;
  logic          var_done;

  always_ff @(posedge osc_var or posedge clr) begin
    if (clr) begin
      var_cnt  <= '0;
      var_done <= 1'b0;
    end else if (!var_done) begin
      var_cnt  <= var_cnt + 1'b1;
      var_done <= (var_cnt == {1'b0, {FRAC{1'b1}}});
    end
  end

  // ---- BUFFER ring domain: counts until the NAND ring is done ----
  logic [1:0]     var_done_sync;

  always_ff @(posedge osc_ref or posedge clr) begin
    if (clr) begin
      ref_cnt       <= '0;
      var_done_sync <= '0;
      ref_done      <= 1'b0;
    end else begin
      var_done_sync <= {var_done_sync[0], var_done};
      if (var_done_sync[1]) ref_done <= 1'b1;
      else                  ref_cnt  <= ref_cnt + 1'b1;
    end
  end

endmodule
