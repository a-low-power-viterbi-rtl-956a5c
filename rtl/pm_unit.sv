// pm_unit: path metric registers of the 64 trellis states.
//
// Holds one PM_W-bit metric per state.  Reset loads the starting condition
// of the Viterbi algorithm: state 0 (where the encoder starts) gets 0, every
// other state INIT_OTHER, a finite stand-in for "infinity" that keeps all
// metrics within the window of the modular comparison.  No normalisation
// logic is needed: the metrics wrap and the ACS compares them modulo 2^PM_W.
//
// Interface: pm_next is loaded at the rising edge when en is high; pm is the
// register output.  Reset is active low and synchronous.  The register bank
// and the modular scheme follow the document; INIT_OTHER is this design's.
module pm_unit
  import vd_pkg::*;
#(
  parameter int unsigned PM_W       = 9,
  parameter int unsigned INIT_OTHER = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [NSTATES-1:0][PM_W-1:0] pm_next,
  output logic [NSTATES-1:0][PM_W-1:0] pm
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NSTATES); s++)
        pm[s] <= (s == 0) ? '0 : PM_W'(INIT_OTHER);
    end else if (en) begin
      pm <= pm_next;
    end
  end

endmodule
