// qca_xor2: two-input XOR gate in majority logic.
// The XOR is the NAND of a and b ANDed with their OR:
//   y = Maj( ~Maj(a,b,0), Maj(a,b,1), 0 ) = ~(ab) & (a + b).
// That is three majority gates and one inverter. The compact QCA cell layouts
// of a dedicated XOR are a physical matter; at the logic level this gate
// computes the same function. Interface: a, b in; y = a ^ b out. Combinational.
module qca_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic and_ab, or_ab, nand_ab;
  maj3 u_and (.a(a),       .b(b),     .c(1'b0), .y(and_ab));
  maj3 u_or  (.a(a),       .b(b),     .c(1'b1), .y(or_ab));
  assign nand_ab = ~and_ab;
  maj3 u_out (.a(nand_ab), .b(or_ab), .c(1'b0), .y(y));
endmodule
