// qca_and_tb: exhaustive check of the two-input AND gate built from
// majority gates, against the truth table of a & b.
module qca_and_tb;

  int checks = 0;
  int failures = 0;

  logic a, b, y;

  qca_and dut (.a(a), .b(b), .y(y));

  // Truth table, rows in the order a b = 00, 01, 10, 11.
  localparam logic [3:0] TABLE = {1'b1 & 1'b1, 1'b1 & 1'b0, 1'b0 & 1'b1, 1'b0 & 1'b0};

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
      if (y !== TABLE[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
