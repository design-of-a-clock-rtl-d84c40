// Behavioural model of the standard-cell delay generator: a timing model of
// buffer and multiplexer chains, not synthesizable logic.
//
// The real line is a coarse stage of 256 buffer cells with a 256-to-1 path
// selector followed by a fine stage with a 32-to-1 selector; encoders turn
// the 8-bit coarse and 5-bit fine codes into the selector controls. The
// model applies, edge by edge (transport delay, so several edges may be in
// flight at once),
//   delay = D0_PS + coarse * T_COARSE_PS + fine * T_FINE_PS
// where code = {coarse[7:0], fine[4:0]}. D0_PS is the intrinsic (minimum)
// delay of the line. The fine step default is the 125 ps typical-corner
// resolution of the design. The coarse cell is set to exactly 32 fine steps
// so that the 13-bit code is one linear, monotonic count of fine steps,
// which the counter-based measurement relies on; the design itself quotes a
// different coarse cell delay, so this linear weighting is the model's choice.
// A code change affects only edges that enter the line after it.
module std_cell_delay_line #(
  parameter real D0_PS       = 500.0,
  parameter real T_FINE_PS   = 125.0,
  parameter real T_COARSE_PS = 32.0 * T_FINE_PS
) (
  input  logic        din,
  input  logic [12:0] code,
  output logic        dout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0] coarse;
  logic [4:0] fine;
  assign coarse = code[12:5];
  assign fine   = code[4:0];

  initial dout = 1'b0;

  // Transport delay: every input edge is scheduled on its own.
  always @(posedge din or negedge din) begin
    automatic logic v = din;
    automatic real  d = D0_PS + real'(coarse) * T_COARSE_PS + real'(fine) * T_FINE_PS;
    fork
      begin
        #(d) dout = v;
      end
    join_none
  end

endmodule
