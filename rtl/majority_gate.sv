// majority_gate: the basic QCA logic gate.
//
// The output is 1 when more than half of the inputs are 1. With three
// inputs this is Maj(A,B,C) = AB + AC + BC; wider gates take any odd
// number 2n+1 of inputs. In a QCA layout the inputs meet at a central
// device cell whose polarization follows the majority of its neighbours.
//
// Interface: in[N-1:0] inputs, out the majority. Purely combinational.
// The function and the 2n+1 input rule follow the QCA majority gate;
// the population-count form is this design's way of writing it for any N.
module majority_gate #(
  parameter int unsigned N = 3  // number of inputs, odd
) (
  input  logic [N-1:0] in,
  output logic         out
);

  initial begin
    assert (N % 2 == 1) else $error("majority_gate: N must be odd");
  end

  logic [$clog2(N+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) begin
      ones = ones + ($clog2(N+1))'(in[i]);
    end
    out = (ones > ($clog2(N+1))'(N / 2));
  end

endmodule
