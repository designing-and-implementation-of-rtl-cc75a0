// reversible_comparator_tb: checks the 1-bit reversible comparator for
// every operand pair against the comparator truth table (L = A<B,
// E = A=B, G = A>B, written out row by row), checks the Feynman lines
// (P = A, Q = A xor B) and that exactly one flag is set.
module reversible_comparator_tb;
  import qca_pkg::*;

  int checks = 0;
  int failures = 0;

  logic a, b, p, q;
  cmp_result_t res;

  reversible_comparator dut (.a(a), .b(b), .res(res), .p(p), .q(q));

  // Expected {L, E, G} for A B = 00, 01, 10, 11.
  localparam logic [2:0] EXP [4] = '{3'b010, 3'b100, 3'b001, 3'b010};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({res.l, res.e, res.g} !== EXP[v]) begin
        failures++;
        $display("FAIL A=%b B=%b: LEG=%b%b%b expected %b",
                 a, b, res.l, res.e, res.g, EXP[v]);
      end
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL A=%b B=%b: P=%b Q=%b", a, b, p, q);
      end
      checks++;
      if ($countones(res) != 1) begin
        failures++;
        $display("FAIL A=%b B=%b: flags not one-hot", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
