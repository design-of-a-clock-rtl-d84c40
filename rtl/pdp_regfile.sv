// Register file holding the process dependent parameters (PDPs) a, b and c
// of the embedded oscillator's mapper, written once by the tester after the
// Locked Codes of several operating conditions have been fitted. It stands
// in for a one-time-programmable store. A simple write port (addr 0 = a,
// 1 = b, 2 = c; address 3 is ignored) loads the words on the clock edge where
// we is high; the three registers are read in parallel. Reset clears them.
// The register file and its three words follow the design description; the
// write port is this implementation's choice.
module pdp_regfile #(
  parameter int unsigned P_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [1:0]            addr,
  input  logic [P_W-1:0]        wdata,
  output logic signed [P_W-1:0] pdp_a,
  output logic signed [P_W-1:0] pdp_b,
  output logic signed [P_W-1:0] pdp_c
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pdp_a <= '0;
      pdp_b <= '0;
      pdp_c <= '0;
    end else if (we) begin
      unique case (addr)
        2'd0:    pdp_a <= wdata;
        2'd1:    pdp_b <= wdata;
        2'd2:    pdp_c <= wdata;
        default: ;
      endcase
    end
  end

endmodule
