// qca_zone: the cells of one QCA clock zone, seen as a W-bit register.
//
// In the Switch phase the zone's cells take the polarization driven by the
// logic in front of them; in the Hold phase they keep it and drive the
// next zone; in Release and Relax they lose it. The register loads d at
// the end of a Switch tick and q is then valid for the following Hold
// tick, which is exactly the tick in which the next zone is in Switch.
//
// Interface: clk (one tick per phase), rst_n (asynchronous, active low,
// clears q), phase (this zone's phase from qca_clock), d, q, and
// polarized, high during Hold when q may be used. A two-state model has no
// unpolarized value, so q keeps the old bits through Release and Relax;
// polarized tells when they are meaningful. The phase behaviour follows
// QCA clocking; the register form and the reset are this design's choice.
module qca_zone
  import qca_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  qca_phase_e   phase,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         polarized
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  q <= '0;
    else if (phase == PH_SWITCH) q <= d;
  end

  assign polarized = (phase == PH_HOLD);

endmodule
