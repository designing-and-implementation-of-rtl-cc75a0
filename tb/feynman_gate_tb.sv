// feynman_gate_tb: checks the Feynman gate against its truth table
// (P = A, Q = A xor B, written out row by row) and checks that it is
// reversible: the four input pairs give four different output pairs, and
// feeding the outputs through a second gate gives the inputs back.
module feynman_gate_tb;

  int checks = 0;
  int failures = 0;

  logic a, b, p, q, a2, b2;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(a2), .q(b2));  // inverse (CNOT is its own)

  // Expected {P, Q} for A B = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== EXP[v]) begin
        failures++;
        $display("FAIL A=%b B=%b: P=%b Q=%b expected %b", a, b, p, q, EXP[v]);
      end
      checks++;
      if ({a2, b2} !== {a, b}) begin
        failures++;
        $display("FAIL inverse of A=%b B=%b gave %b%b", a, b, a2, b2);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'b1111) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
