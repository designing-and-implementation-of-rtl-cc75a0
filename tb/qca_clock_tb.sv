// qca_clock_tb: checks the four-phase clock against an independent model.
//
// After reset zone 0 must be in Switch; every tick each zone moves on to
// the next phase (Switch, Hold, Release, Relax, Switch ...), and zone k+1
// always runs one phase behind zone k, so it is in Switch exactly while
// zone k is in Hold. A reset in the middle must restart the sequence.
module qca_clock_tb;
  import qca_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  qca_phase_e zone_phase [NUM_ZONES];

  qca_clock dut (.clk(clk), .rst_n(rst_n), .zone_phase(zone_phase));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected phase of zone k after t ticks since reset.
  function automatic qca_phase_e expected(int t, int k);
    case (((t - k) % 4 + 4) % 4)
      0:       return PH_SWITCH;
      1:       return PH_HOLD;
      2:       return PH_RELEASE;
      default: return PH_RELAX;
    endcase
  endfunction

  task automatic check_ticks(int n);
    for (int t = 0; t < n; t++) begin
      for (int k = 0; k < NUM_ZONES; k++) begin
        checks++;
        if (zone_phase[k] !== expected(t, k)) begin
          failures++;
          $display("FAIL tick %0d zone %0d phase %0d expected %0d",
                   t, k, zone_phase[k], expected(t, k));
        end
      end
      for (int k = 0; k + 1 < NUM_ZONES; k++) begin
        checks++;
        if ((zone_phase[k] == PH_HOLD) != (zone_phase[k+1] == PH_SWITCH)) begin
          failures++;
          $display("FAIL tick %0d: zone %0d Hold / zone %0d Switch out of step",
                   t, k, k + 1);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_ticks(13);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check_ticks(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
