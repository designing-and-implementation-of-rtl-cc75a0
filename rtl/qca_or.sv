// qca_or: two-input OR gate made from a three-input majority gate.
//
// One input of the majority gate is a fixed cell with polarization +1
// (logic 1), so the output is 1 when either free input is 1:
// Maj(a, b, 1) = a | b. This is the standard QCA OR construction.
//
// Interface: a, b inputs; y = a | b. Purely combinational.
module qca_or
  import qca_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  majority_gate #(.N(3)) u_maj (
    .in  ({FIXED_POS, b, a}),
    .out (y)
  );

endmodule
