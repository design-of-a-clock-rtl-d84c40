// Control unit (CU) of the calibration ADPLL.
//
// Runs on the reference clock and searches the 19-bit DCO codeword with a
// bang-bang binary search, one field at a time: coarse (8 bits), first fine
// (5 bits), second fine (6 bits). After reset every field sits at the middle
// of its range. Each field starts with a step of a quarter of its range
// (64, 8 and 16). Every N_RESP reference cycles the CU reads the PFD:
// a slow DCO lowers the field by the step (less delay, higher frequency), a
// fast DCO raises it. When the PFD verdict flips (the polarity signal shows an
// inversion) the step is halved; an inversion with a step of one closes the
// field and the search moves to the next; so does a window whose phase error
// stayed inside the PFD dead zone (both flags high), which in the average
// state counts like an inversion, and so does a verdict that pushes a field
// against the end it already sits at (flow under- or overflow). After the second fine field the CU
// enters the average state and keeps stepping the second fine field by one,
// while the digital loop filter collects the extremes; lock_in from the
// filter ends the search.
//
// Each new codeword is applied while the DCO is held stopped (dco_rst) for
// one reference cycle; the DCO restarts in phase with the next reference
// edge. pfd_clr stays high half a cycle longer (released on the falling
// reference edge) so that the detector never pairs the two restart edges.
// The window length, the step rules and the status encodings follow the
// design description; the half-cycle PFD release, the behaviour in the dead
// zone (no step) and saturation at the ends of a field are choices of this
// implementation.
//
// Timing: one codeword update every N_RESP reference cycles; upd pulses for
// one cycle with each update.
module adpll_cu
  import cg_pkg::*;
#(
  parameter int unsigned N_RESP = 16
) (
  input  logic          clk,       // reference clock
  input  logic          rst_n,
  input  logic          en,        // calibration mode
  input  logic          up,        // PFD: DCO too slow
  input  logic          dn,        // PFD: DCO too fast
  input  logic          lock_in,   // from the loop filter
  output dco_code_t     code,
  output logic          dco_rst,
  output logic          pfd_clr,
  output logic          upd,
  output logic          inv,       // this update saw a polarity inversion
  output search_state_t state,
  output trend_t        trend,
  output polarity_t     polarity,
  output flow_t         flow
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CNT_W = $clog2(N_RESP + 1);

  logic [CNT_W-1:0] cnt;
  logic [6:0]       step;

  logic   decide;
  trend_t t_now;
  logic   inverted;

  assign decide = en && (state != ST_LOCKED) && (cnt == CNT_W'(N_RESP - 1));

  // The PFD flags change on reference and DCO edges; sample them half a
  // reference cycle away from the decision edge.
  logic up_s, dn_s;
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_s <= 1'b0;
      dn_s <= 1'b0;
    end else begin
      up_s <= up;
      dn_s <= dn;
    end
  end

  always_comb begin
    if (up_s && !dn_s)      t_now = TREND_SLOW;
    else if (dn_s && !up_s) t_now = TREND_FAST;
    else                t_now = TREND_INIT;   // dead zone: no verdict
  end

  // Both flags high: the phase error stayed inside the dead zone for a whole
  // window, so this field cannot get any closer.
  logic dz;
  assign dz = up_s && dn_s;

  // The field already sits at the end the verdict pushes it to: it cannot
  // get any closer either (target outside this field's reach).
  logic at_end;
  always_comb begin
    logic [7:0] v, vmax;
    unique case (state)
      ST_COARSE: begin v = code.coarse;         vmax = 8'd255; end
      ST_FINE1:  begin v = {3'b0, code.fine1};  vmax = 8'd31;  end
      default:   begin v = {2'b0, code.fine2};  vmax = 8'd63;  end
    endcase
    at_end = (t_now == TREND_SLOW && v == 8'd0) || (t_now == TREND_FAST && v == vmax);
  end

  assign inverted = (trend != TREND_INIT) && (t_now != TREND_INIT) && (t_now != trend);

  // Step applied to one field with saturation; reports the flow status.
  function automatic logic [7:0] move(input logic [7:0] v, input logic [7:0] max,
                                      input logic [6:0] s, input trend_t t,
                                      output flow_t f);
    logic [8:0] sum;
    f = FLOW_NORMAL;
    if (t == TREND_SLOW) begin
      if ({1'b0, v} < {2'b0, s}) begin
        f = FLOW_UNDER;
        return 8'd0;
      end
      return v - 8'(s);
    end else if (t == TREND_FAST) begin
      sum = {1'b0, v} + {2'b0, s};
      if (sum > {1'b0, max}) begin
        f = FLOW_OVER;
        return max;
      end
      return sum[7:0];
    end
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      step     <= 7'd64;
      state    <= ST_COARSE;
      trend    <= TREND_INIT;
      polarity <= POL_INIT;
      flow     <= FLOW_INIT;
      code     <= '{coarse: 8'd128, fine1: 5'd16, fine2: 6'd32};
      dco_rst  <= 1'b1;
      upd      <= 1'b0;
      inv      <= 1'b0;
    end else begin
      upd <= 1'b0;
      inv <= 1'b0;
      if (!en) begin
        cnt     <= '0;
        dco_rst <= 1'b1;
      end else if (state == ST_LOCKED) begin
        dco_rst <= 1'b0;
      end else if (lock_in) begin
        state   <= ST_LOCKED;
        dco_rst <= 1'b1;          // restart once more on the locked code
        cnt     <= '0;
      end else if (decide) begin
        flow_t      f;
        logic [6:0] s;
        logic [7:0] nv;
        s = step;
        f = FLOW_NORMAL;
        cnt     <= '0;
        dco_rst <= 1'b1;
        upd     <= 1'b1;
        inv     <= inverted || dz;
        if (t_now != TREND_INIT) begin
          trend <= t_now;
          if (trend == TREND_INIT || !inverted) polarity <= (trend == TREND_INIT) ? POL_INIT : POL_SAME;
          else polarity <= (t_now == TREND_FAST) ? POL_SLOW_TO_FAST : POL_FAST_TO_SLOW;
        end
        if (((inverted && step == 7'd1) || dz || at_end) && state != ST_AVG) begin
          // this field is bracketed: hand over to the next one
          trend <= TREND_INIT;
          if (at_end) flow <= (t_now == TREND_SLOW) ? FLOW_UNDER : FLOW_OVER;
          unique case (state)
            ST_COARSE: begin state <= ST_FINE1; step <= 7'd8;  end
            ST_FINE1:  begin state <= ST_FINE2; step <= 7'd16; end
            default:   begin state <= ST_AVG;   step <= 7'd1;  end
          endcase
        end else begin
          if (inverted && step > 7'd1) s = step >> 1;
          step <= s;
          unique case (state)
            ST_COARSE: begin
              nv = move(code.coarse, 8'd255, s, t_now, f);
              code.coarse <= nv;
            end
            ST_FINE1: begin
              nv = move({3'b0, code.fine1}, 8'd31, s, t_now, f);
              code.fine1 <= nv[4:0];
            end
            default: begin
              nv = move({2'b0, code.fine2}, 8'd63, s, t_now, f);
              code.fine2 <= nv[5:0];
            end
          endcase
          if (t_now != TREND_INIT) flow <= f;
        end
      end else begin
        cnt     <= cnt + 1'b1;
        dco_rst <= 1'b0;
      end
    end
  end

  // Keep the PFD cleared until the falling reference edge after a restart.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) pfd_clr <= 1'b1;
    else        pfd_clr <= dco_rst;
  end

endmodule
