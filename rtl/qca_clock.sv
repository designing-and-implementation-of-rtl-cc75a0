// qca_clock: four-phase QCA clock, one phase per clock zone.
//
// A QCA clock cycle has four phases, Switch, Hold, Release and Relax, and
// the four clock zones of a layout see the same waveform shifted by a
// quarter cycle each: while zone k is in Hold, zone k+1 is in Switch and
// takes its value from zone k. This is what moves data through a layout.
//
// Here one tick of clk is one phase (a quarter of a QCA clock cycle). A
// two-bit counter gives zone 0's phase; zone k's phase is the counter
// minus k, modulo four. After reset zone 0 is in Switch, zone 1 in Relax,
// zone 2 in Release and zone 3 in Hold.
//
// Interface: clk, rst_n (asynchronous, active low); zone_phase[k] is the
// phase of zone k during the current tick. The four-phase scheme follows
// QCA clocking; the real clock is an electric field under the cells, and
// this counter is this design's digital stand-in for it.
module qca_clock
  import qca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output qca_phase_e zone_phase [NUM_ZONES]
);

  logic [1:0] tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick <= 2'd0;
    else        tick <= tick + 2'd1;
  end

  always_comb begin
    for (int unsigned k = 0; k < NUM_ZONES; k++) begin
      zone_phase[k] = qca_phase_e'(tick - 2'(k));
    end
  end

endmodule
