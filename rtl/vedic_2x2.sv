// vedic_2x2: 2-bit by 2-bit multiplier after the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule. Vertically: p0 = a0 b0. Crosswise:
// a1 b0 + a0 b1 in a half adder gives p1 and a carry. Vertically again:
// a1 b1 plus that carry in a second half adder gives p2 and p3.
// Four AND gates and two half adders, as the method prescribes.
// Interface: a, b [1:0] in; p [3:0] = a * b out. Combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1, c1;
  qca_and2 u_and00 (.a(a[0]), .b(b[0]), .y(a0b0));
  qca_and2 u_and10 (.a(a[1]), .b(b[0]), .y(a1b0));
  qca_and2 u_and01 (.a(a[0]), .b(b[1]), .y(a0b1));
  qca_and2 u_and11 (.a(a[1]), .b(b[1]), .y(a1b1));
  assign p[0] = a0b0;
  half_adder u_ha1 (.a(a1b0), .b(a0b1), .sum(p[1]), .carry(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .sum(p[2]), .carry(p[3]));
endmodule
