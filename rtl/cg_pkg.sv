// Shared types and constants of the embedded-oscillator clock generator.
//
// The HDC-DCO codeword is 19 bits: an 8-bit coarse field, a 5-bit first fine
// field and a 6-bit second fine field (coarse in the upper bits). The control
// unit of the calibration ADPLL reports its view of the loop with three 2-bit
// status signals (trend, polarity, flow) whose encodings are fixed here.
// The field widths and the status encodings follow the design description;
// the packing order of the three fields is this implementation's choice.
package cg_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned COARSE_W = 8;
  localparam int unsigned FINE1_W  = 5;
  localparam int unsigned FINE2_W  = 6;
  localparam int unsigned CODE_W   = COARSE_W + FINE1_W + FINE2_W;  // 19

  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE1_W-1:0]  fine1;
    logic [FINE2_W-1:0]  fine2;
  } dco_code_t;

  // Which DCO field the search is working on.
  typedef enum logic [2:0] {
    ST_COARSE = 3'd0,
    ST_FINE1  = 3'd1,
    ST_FINE2  = 3'd2,
    ST_AVG    = 3'd3,
    ST_LOCKED = 3'd4
  } search_state_t;

  // DCO speed relative to the reference, as seen by the PFD.
  typedef enum logic [1:0] {
    TREND_SLOW = 2'b00,
    TREND_FAST = 2'b01,
    TREND_INIT = 2'b11
  } trend_t;

  // Present trend compared with the previous one.
  typedef enum logic [1:0] {
    POL_SAME         = 2'b00,
    POL_SLOW_TO_FAST = 2'b01,
    POL_FAST_TO_SLOW = 2'b10,
    POL_INIT         = 2'b11
  } polarity_t;

  // Whether the last step hit an end of the field being searched.
  typedef enum logic [1:0] {
    FLOW_UNDER  = 2'b00,
    FLOW_INIT   = 2'b01,
    FLOW_NORMAL = 2'b10,
    FLOW_OVER   = 2'b11
  } flow_t;

  // ADPWCL delay-generator code width (coarse 8 bits + fine 5 bits).
  localparam int unsigned DLY_W = 13;

endpackage
