// qca_comparator_top_tb: end-to-end test of the clocked Feynman gate and
// reversible comparator, at the top's default (and only) configuration.
//
// New random operands are offered on every tick, so the test also shows
// that the input cells sample only at the end of zone 0's Switch tick.
// For each sample an independent model predicts the outputs (P = A,
// Q = A xor B; L = A<B, E = A=B, G = A>B) and the tick at which they must
// appear: two ticks (half a QCA clock cycle) later, flagged by *_valid.
// The test also checks that valid comes once per four ticks, that a
// reset in mid-run clears the outputs, and counts how often each clock
// phase, each Feynman row and each comparator outcome occurred; one that
// never occurred counts as a failure.
module qca_comparator_top_tb;
  import qca_pkg::*;

  localparam int unsigned HALF_CYCLE_TICKS = 2;  // 0.5 QCA clock cycle
  localparam int unsigned NUM_SAMPLES      = 200;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fg_a = 1'b0, fg_b = 1'b0, cmp_a = 1'b0, cmp_b = 1'b0;
  logic fg_p, fg_q, fg_valid, cmp_valid;
  cmp_result_t cmp_res;
  qca_phase_e zone_phase [NUM_ZONES];

  qca_comparator_top dut (
    .clk(clk), .rst_n(rst_n),
    .fg_a(fg_a), .fg_b(fg_b), .fg_p(fg_p), .fg_q(fg_q), .fg_valid(fg_valid),
    .cmp_a(cmp_a), .cmp_b(cmp_b), .cmp_res(cmp_res), .cmp_valid(cmp_valid),
    .zone_phase(zone_phase)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Samples taken by the input cells, with the edge count after the
  // edge that took them.
  typedef struct {
    int         tick;
    logic [3:0] in;  // {fg_a, fg_b, cmp_a, cmp_b}
  } sample_t;

  sample_t pending[$];
  int tick = 0;
  int last_valid_tick = -1;
  int n_samples = 0;

  // Event counters.
  int phase_seen [4];
  int fg_row_seen [4];
  int n_less = 0, n_equal = 0, n_greater = 0;
  int n_half_cycle = 0;
  int n_reset_clear = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL tick %0d: %s", tick, msg);
  endtask

  // Record what the input cells take at this edge.
  always @(posedge clk) begin
    if (rst_n) begin
      tick <= tick + 1;
      for (int k = 0; k < NUM_ZONES; k++) phase_seen[zone_phase[k]]++;
      if (zone_phase[0] == PH_SWITCH) begin
        pending.push_back('{tick: tick + 1, in: {fg_a, fg_b, cmp_a, cmp_b}});
      end
    end
  end

  // Check the outputs between edges, then offer new operands.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (fg_valid !== cmp_valid) fail("the two circuits disagree on valid");
      if (fg_valid) begin
        sample_t s;
        logic a, b, fa, fb;
        if (pending.size() == 0) begin
          fail("valid without a sample");
        end else begin
          s = pending.pop_front();
          {fa, fb, a, b} = s.in;
          // Latency: s.tick edges had passed when the sample was taken;
          // the outputs are valid HALF_CYCLE_TICKS edges later.
          checks++;
          if (tick - s.tick != int'(HALF_CYCLE_TICKS)) begin
            fail($sformatf("latency %0d ticks, expected %0d",
                           tick - s.tick, HALF_CYCLE_TICKS));
          end else begin
            n_half_cycle++;
          end
          checks++;
          if (fg_p !== fa || fg_q !== (fa ^ fb)) begin
            fail($sformatf("Feynman A=%b B=%b gave P=%b Q=%b", fa, fb, fg_p, fg_q));
          end
          fg_row_seen[{fa, fb}]++;
          checks++;
          if (cmp_res.l !== (!a && b) || cmp_res.e !== (a == b) ||
              cmp_res.g !== (a && !b)) begin
            fail($sformatf("comparator A=%b B=%b gave L=%b E=%b G=%b",
                           a, b, cmp_res.l, cmp_res.e, cmp_res.g));
          end
          if (cmp_res.l) n_less++;
          if (cmp_res.e) n_equal++;
          if (cmp_res.g) n_greater++;
          n_samples++;
        end
        // Rate: one result per QCA clock cycle (four ticks).
        if (last_valid_tick >= 0) begin
          checks++;
          if (tick - last_valid_tick != 4)
            fail($sformatf("valid %0d ticks after the previous one", tick - last_valid_tick));
        end
        last_valid_tick = tick;
      end
    end
    {fg_a, fg_b, cmp_a, cmp_b} = 4'($urandom);
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      phase_seen[i] = 0;
      fg_row_seen[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n_samples == NUM_SAMPLES / 2);
    // Reset in mid-run: every zone clears, then the circuits restart.
    @(posedge clk);
    #1;
    rst_n = 1'b0;
    #1;
    checks++;
    if (fg_p !== 1'b0 || fg_q !== 1'b0 || cmp_res !== '0)
      fail("outputs not cleared by reset");
    else
      n_reset_clear++;
    pending.delete();
    last_valid_tick = -1;
    tick = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (n_samples == NUM_SAMPLES);
    @(negedge clk);

    $display("events: half-cycle results=%0d less=%0d equal=%0d greater=%0d resets=%0d",
             n_half_cycle, n_less, n_equal, n_greater, n_reset_clear);
    $display("events: Switch=%0d Hold=%0d Release=%0d Relax=%0d",
             phase_seen[PH_SWITCH], phase_seen[PH_HOLD],
             phase_seen[PH_RELEASE], phase_seen[PH_RELAX]);
    $display("events: Feynman rows 00=%0d 01=%0d 10=%0d 11=%0d",
             fg_row_seen[0], fg_row_seen[1], fg_row_seen[2], fg_row_seen[3]);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (phase_seen[i] == 0) fail($sformatf("clock phase %0d never occurred", i));
      if (fg_row_seen[i] == 0) fail($sformatf("Feynman row %0d never occurred", i));
    end
    checks += 5;
    if (n_less == 0)        fail("A<B never occurred");
    if (n_equal == 0)       fail("A=B never occurred");
    if (n_greater == 0)     fail("A>B never occurred");
    if (n_half_cycle == 0)  fail("no result was timed");
    if (n_reset_clear == 0) fail("reset never cleared the outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
