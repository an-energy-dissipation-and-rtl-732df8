// qca_and2: two-input AND gate in majority logic. A three-input majority gate
// whose third input is held at logic 0 (polarization -1 in QCA terms) outputs
// 1 only when both other inputs are 1. Interface: a, b in; y = a & b out.
// Combinational.
module qca_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  maj3 u_maj (.a(a), .b(b), .c(1'b0), .y(y));
endmodule
