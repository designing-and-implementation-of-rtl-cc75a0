// qca_comparator_top: the Feynman gate and the 1-bit reversible comparator
// as clocked QCA layouts.
//
// Two independent circuits share one four-phase clock (qca_clock):
//   * a Feynman gate: fg_p = fg_a, fg_q = fg_a ^ fg_b;
//   * a 1-bit reversible comparator: cmp_res = {l, e, g} for cmp_a, cmp_b.
// Each is laid over three clock zones. Zone 0 holds the input cells, the
// gate logic sits between zone 0 and zone 1, whose cells catch its result,
// and zone 2 holds the output cells. A value therefore moves from the
// input cells to the output cells in two phases, half a QCA clock cycle,
// which is the delay both circuits are specified with.
//
// Timing (one clk tick per phase): the inputs are sampled at the end of
// every tick in which zone 0 is in Switch, that is once every four ticks;
// two ticks later the outputs hold the result and *_valid is high for one
// tick (zone 2 in Hold). A new input pair can be taken every QCA clock
// cycle. rst_n is asynchronous and active low and clears every zone.
//
// The functions and the half-cycle delay follow the specified circuits;
// the split of each layout into zones and the reset are this design's own.
module qca_comparator_top
  import qca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Feynman gate
  input  logic        fg_a,
  input  logic        fg_b,
  output logic        fg_p,
  output logic        fg_q,
  output logic        fg_valid,
  // 1-bit reversible comparator
  input  logic        cmp_a,
  input  logic        cmp_b,
  output cmp_result_t cmp_res,
  output logic        cmp_valid,
  // clock zone phases, for observation
  output qca_phase_e  zone_phase [NUM_ZONES]
);

  qca_clock u_clock (.clk(clk), .rst_n(rst_n), .zone_phase(zone_phase));

  // ---------------------------------------------------------------- Feynman
  logic [1:0] fg_in_q, fg_mid_d, fg_mid_q, fg_out_q;
  logic       fg_in_pol, fg_mid_pol;

  qca_zone #(.W(2)) u_fg_z0 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[0]),
    .d({fg_a, fg_b}), .q(fg_in_q), .polarized(fg_in_pol)
  );

  feynman_gate u_fg (
    .a(fg_in_q[1]), .b(fg_in_q[0]), .p(fg_mid_d[1]), .q(fg_mid_d[0])
  );

  qca_zone #(.W(2)) u_fg_z1 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[1]),
    .d(fg_mid_d), .q(fg_mid_q), .polarized(fg_mid_pol)
  );

  qca_zone #(.W(2)) u_fg_z2 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[2]),
    .d(fg_mid_q), .q(fg_out_q), .polarized(fg_valid)
  );

  assign fg_p = fg_out_q[1];
  assign fg_q = fg_out_q[0];

  // ------------------------------------------------------------- comparator
  logic [1:0]  cmp_in_q;
  cmp_result_t cmp_mid_d, cmp_mid_q, cmp_out_q;
  logic        cmp_in_pol, cmp_mid_pol;

  qca_zone #(.W(2)) u_cmp_z0 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[0]),
    .d({cmp_a, cmp_b}), .q(cmp_in_q), .polarized(cmp_in_pol)
  );

  reversible_comparator u_cmp (
    .a(cmp_in_q[1]), .b(cmp_in_q[0]), .res(cmp_mid_d),
    .p(), .q()  // the Feynman lines end inside the comparator
  );

  qca_zone #(.W(3)) u_cmp_z1 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[1]),
    .d(cmp_mid_d), .q(cmp_mid_q), .polarized(cmp_mid_pol)
  );

  qca_zone #(.W(3)) u_cmp_z2 (
    .clk(clk), .rst_n(rst_n), .phase(zone_phase[2]),
    .d(cmp_mid_q), .q(cmp_out_q), .polarized(cmp_valid)
  );

  assign cmp_res = cmp_out_q;

  // A zone may only take a value that the zone in front of it holds.
  a_zone1_after_zone0 : assert property (
    @(posedge clk) disable iff (!rst_n)
    zone_phase[1] == PH_SWITCH |-> fg_in_pol && cmp_in_pol);
  a_zone2_after_zone1 : assert property (
    @(posedge clk) disable iff (!rst_n)
    zone_phase[2] == PH_SWITCH |-> fg_mid_pol && cmp_mid_pol);

  // The comparator's flags are one-hot whenever its output cells hold.
  a_cmp_onehot : assert property (
    @(posedge clk) disable iff (!rst_n)
    cmp_valid |-> $onehot(cmp_out_q));

endmodule
