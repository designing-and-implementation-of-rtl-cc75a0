// reversible_comparator: 1-bit comparator built around a Feynman gate.
//
// A Feynman gate turns the operands into P = A and Q = A ^ B. Q is 1
// exactly when the operands differ, so
//   E = ~Q          (A = B, the XNOR of the operands)
//   G = Q & P       (= A & ~B, A > B)
//   L = Q & B       (= ~A & B, A < B)
// The two products are majority-gate AND gates and E is one inverter,
// so the comparator is one Feynman gate plus two AND gates.
//
// Interface: a, b operands; res = {l, e, g}, exactly one flag set; p and
// q are the Feynman gate's outputs, brought out as the reversible gate's
// garbage/intermediate lines. Purely combinational.
//
// The flags follow the comparator definition L = (A < B), E = (A = B),
// G = (A > B). How the Feynman outputs are combined into L and G (AND with
// B and with P) is this design's reading of the logic circuit.
module reversible_comparator
  import qca_pkg::*;
(
  input  logic        a,
  input  logic        b,
  output cmp_result_t res,
  output logic        p,
  output logic        q
);

  feynman_gate u_fg (.a(a), .b(b), .p(p), .q(q));

  qca_and u_and_g (.a(q), .b(p), .y(res.g));
  qca_and u_and_l (.a(q), .b(b), .y(res.l));

  assign res.e = ~q;

endmodule
