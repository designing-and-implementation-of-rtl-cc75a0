// qca_and: two-input AND gate made from a three-input majority gate.
//
// One input of the majority gate is a fixed cell with polarization -1
// (logic 0), so the output is 1 only when both free inputs are 1:
// Maj(a, b, 0) = a & b. This is the standard QCA AND construction.
//
// Interface: a, b inputs; y = a & b. Purely combinational.
module qca_and
  import qca_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  majority_gate #(.N(3)) u_maj (
    .in  ({FIXED_NEG, b, a}),
    .out (y)
  );

endmodule
