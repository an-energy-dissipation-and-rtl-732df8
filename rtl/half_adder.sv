// half_adder: adds two bits. carry = AB comes from a majority-gate AND, and
// sum = A xor B from the majority-gate XOR (qca_xor2), i.e.
//   carry = Maj(A,B,0),  sum = Maj(~Maj(A,B,0), Maj(A,B,1), 0).
// Interface: a, b in; sum, carry out. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  qca_and2 u_carry (.a(a), .b(b), .y(carry));
  qca_xor2 u_sum   (.a(a), .b(b), .y(sum));
endmodule
