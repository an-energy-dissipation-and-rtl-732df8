// full_adder: adds three bits (a, b and carry in) with two majority gates and
// one inverter. The carry out is the three-input majority of the inputs; the
// sum is the five-input majority of a, b, cin and the inverted carry taken
// twice:
//   cout = Maj3(a, b, cin),  sum = Maj5(a, b, cin, ~cout, ~cout).
// When at most one input is 1, ~cout counts twice and carries the vote; when
// two or more are 1, the sum is 1 only if all three are.
// Interface: a, b, cin in; sum, cout out. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic ncout;
  maj3 u_carry (.a(a), .b(b), .c(cin), .y(cout));
  assign ncout = ~cout;
  maj5 u_sum (.a(a), .b(b), .c(cin), .d(ncout), .e(ncout), .y(sum));
endmodule
