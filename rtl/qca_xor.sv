// qca_xor: two-input exclusive OR built from majority gates.
//
// Computes a ^ b as the sum of products A'B + AB': two majority-gate AND
// gates form A'B and AB' from the inputs and their inverses, and a
// majority-gate OR joins them. In QCA an inverter is a pair of cells
// placed diagonally to the line; here it is written as ~.
//
// Interface: a, b inputs; y = a ^ b. Purely combinational.
// The sum-of-products form is the XOR equation used for the layout; the
// choice of three majority gates and two inverters is the usual QCA XOR
// and an assumption of this design where the layout itself is not given.
module qca_xor (
  input  logic a,
  input  logic b,
  output logic y
);

  logic na_b;  // A'B
  logic a_nb;  // AB'

  qca_and u_and_lo (.a(~a), .b(b),  .y(na_b));
  qca_and u_and_hi (.a(a),  .b(~b), .y(a_nb));
  qca_or  u_or     (.a(na_b), .b(a_nb), .y(y));

endmodule
