// qca_or2: two-input OR gate in majority logic. A three-input majority gate
// whose third input is held at logic 1 (polarization +1 in QCA terms) outputs
// 1 when either other input is 1. Interface: a, b in; y = a | b out.
// Combinational.
module qca_or2 (
  input  logic a,
  input  logic b,
  output logic y
);
  maj3 u_maj (.a(a), .b(b), .c(1'b1), .y(y));
endmodule
