// feynman_gate: the 2x2 reversible controlled-NOT (Feynman) gate.
//
// Outputs P = A and Q = A ^ B. The map from (A, B) to (P, Q) is one to
// one, so no information is lost and the inputs can always be recovered
// from the outputs; the gate has quantum cost 1 and also serves as a
// fan-out element (with B = 0, both outputs copy A).
//
// Interface: a (control), b (target); p = a, q = a ^ b. Purely
// combinational. P is a straight line of cells from A; Q is formed by a
// majority-gate XOR (qca_xor).
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;

  qca_xor u_xor (.a(a), .b(b), .y(q));

endmodule
