// majority_gate_tb: exhaustive check of the majority gate.
//
// Drives every input pattern into a three-input gate (the basic QCA gate,
// checked against AB + AC + BC) and into a five-input gate (checked
// against "at least three ones"), and prints the TB_RESULT line.
module majority_gate_tb;

  int checks = 0;
  int failures = 0;

  logic [2:0] in3;
  logic       out3;
  logic [4:0] in5;
  logic       out5;

  majority_gate #(.N(3)) dut3 (.in(in3), .out(out3));
  majority_gate #(.N(5)) dut5 (.in(in5), .out(out5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      in3 = 3'(v);
      #1;
      exp = (in3[0] & in3[1]) | (in3[0] & in3[2]) | (in3[1] & in3[2]);
      checks++;
      if (out3 !== exp) begin
        failures++;
        $display("FAIL maj3(%b) = %b, expected %b", in3, out3, exp);
      end
    end
    for (int v = 0; v < 32; v++) begin
      logic exp;
      in5 = 5'(v);
      #1;
      exp = ($countones(in5) >= 3);
      checks++;
      if (out5 !== exp) begin
        failures++;
        $display("FAIL maj5(%b) = %b, expected %b", in5, out5, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
