// qca_zone_tb: checks one clock zone register.
//
// Random data is offered every tick while the testbench steps the zone's
// phase through Switch, Hold, Release and Relax. The zone must take the
// data only at the end of a Switch tick, keep it unchanged in every other
// phase, flag it as polarized only in Hold, and clear on reset.
module qca_zone_tb;
  import qca_pkg::*;

  localparam int unsigned W = 4;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  qca_phase_e phase = PH_SWITCH;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic polarized;
  logic [W-1:0] model = '0;

  qca_zone #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .d(d), .q(q), .polarized(polarized)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL q=%h during reset", q);
    end
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      phase = qca_phase_e'(t % 4);
      d = W'($urandom);
      @(posedge clk);
      if (phase == PH_SWITCH) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL tick %0d phase %s: q=%h expected %h", t, phase.name(), q, model);
      end
      checks++;
      if (polarized !== (phase == PH_HOLD)) begin
        failures++;
        $display("FAIL tick %0d phase %s: polarized=%b", t, phase.name(), polarized);
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL q=%h after reset", q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
