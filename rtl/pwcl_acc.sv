// Auto calibration circuit (ACC) of the pulse width control loop.
//
// From the measured output period and low phase (nowduty), both in fine
// delay steps, and the 4-bit duty setting code k (k = 1..9 asks for a duty
// cycle of k*10 %; 0 is taken as 1 and values above 9 as 9) it computes the
// delay code that places the falling edge of the output clock:
//     SETDUTY = k * period / 10 - (period - nowduty)
// The subtracted term is the high phase the circuit produces with the
// minimum delay, which every delayed reset pulse also passes; a negative
// result is clamped to zero (the shortest pulse the circuit can make).
// The circuit uses one multiplier, one divider by ten and subtractors in a
// four-stage sequence; SETDUTY is presented four clock cycles after the
// measurement arrives (meas_valid) or after the setting code changes, which
// recomputes it from the stored measurement. restart (the start of a new
// measurement) withdraws SETDUTY until the new result is ready.
// The multiply-divide-subtract structure and the four-cycle latency follow
// the design description; the exact formula, with the minimum-phase term, is
// this implementation's reading of it.
module pwcl_acc #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,        // a new measurement begins
  input  logic         meas_valid,
  input  logic [W-1:0] period,
  input  logic [W-1:0] nowduty,
  input  logic [3:0]   duty_code,
  output logic [W-1:0] setduty,
  output logic         setduty_valid,
  output logic         busy
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0]   per_q, now_q;
  logic [3:0]     k_q, k_used;
  logic           have_meas;
  logic [2:0]     phase;          // 0 idle, 1..4 pipeline steps
  logic [W+3:0]   prod;
  logic [W+3:0]   quot;
  logic signed [W+4:0] diff;

  function automatic logic [3:0] clamp_k(input logic [3:0] k);
    if (k == 4'd0) return 4'd1;
    if (k > 4'd9)  return 4'd9;
    return k;
  endfunction

  assign busy = (phase != 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      per_q         <= '0;
      now_q         <= '0;
      k_q           <= 4'd5;
      k_used        <= 4'd5;
      have_meas     <= 1'b0;
      phase         <= 3'd0;
      prod          <= '0;
      quot          <= '0;
      diff          <= '0;
      setduty       <= '0;
      setduty_valid <= 1'b0;
    end else begin
      if (restart) begin
        setduty_valid <= 1'b0;
        have_meas     <= 1'b0;
        phase         <= 3'd0;
      end else if (meas_valid) begin
        per_q         <= period;
        now_q         <= nowduty;
        k_q           <= clamp_k(duty_code);
        have_meas     <= 1'b1;
        setduty_valid <= 1'b0;
        phase         <= 3'd1;
      end else if (phase == 3'd0 && have_meas && clamp_k(duty_code) != k_used) begin
        k_q   <= clamp_k(duty_code);
        phase <= 3'd1;
      end else begin
        unique case (phase)
          3'd1: begin                       // multiply
            prod   <= (W + 4)'(per_q) * (W + 4)'(k_q);
            k_used <= k_q;
            phase  <= 3'd2;
          end
          3'd2: begin                       // divide by ten, rounded
            quot  <= (prod + (W + 4)'(5)) / (W + 4)'(10);
            phase <= 3'd3;
          end
          3'd3: begin                       // subtract the minimum high phase
            diff  <= $signed({1'b0, quot}) - $signed((W + 5)'(per_q))
                     + $signed((W + 5)'(now_q));
            phase <= 3'd4;
          end
          3'd4: begin                       // clamp and present
            if (diff < 0)                          setduty <= '0;
            else if (diff > $signed((W + 5)'({W{1'b1}}))) setduty <= '1;
            else                                   setduty <= diff[W-1:0];
            setduty_valid <= 1'b1;
            phase         <= 3'd0;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
