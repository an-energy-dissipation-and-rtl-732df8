// vedic_4x4_fa: 4-bit by 4-bit Vedic multiplier built directly from gates:
// 16 AND gates, 8 half adders, 7 full adders and one XOR.
//
// The sixteen partial products a[i]&b[j] (weight i+j) fall into four 2x2
// groups: LL = a[1:0]xb[1:0], HL = a[3:2]xb[1:0], LH = a[1:0]xb[3:2] and
// HH = a[3:2]xb[3:2]. Three rows of adders reduce them:
//   row 1  one half adder per group adds that group's two crosswise
//          products (LL gives p[1] directly);
//   row 2  a carry-save row (FA, HA, FA, FA, HA, FA for columns 2..6)
//          leaves at most two bits in columns 2..5 and one in column 6;
//   row 3  a ripple row (HA, FA, FA, FA, HA, XOR for columns 2..7) forms
//          p[7:2]. Column 7 needs only the sum of its two bits, so an XOR
//          replaces the last adder: the product never exceeds 8 bits.
// The order of the adder types in each row is the one of the published block
// diagram; which partial product goes into which adder is this design's own
// choice, made so that each column is fully reduced.
// Interface: a, b [3:0] in; p [7:0] = a * b out. Combinational.
module vedic_4x4_fa (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // partial products: pp[i][j] = a[i] & b[j]
  logic [3:0][3:0] pp;
  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      qca_and2 u_and (.a(a[i]), .b(b[j]), .y(pp[i][j]));
    end
  end

  // row 1: crosswise products of each 2x2 group
  logic c_ll, s_hl, c_hl, s_lh, c_lh, s_hh, c_hh;
  half_adder u_ha_ll (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .carry(c_ll));
  half_adder u_ha_hl (.a(pp[3][0]), .b(pp[2][1]), .sum(s_hl), .carry(c_hl));
  half_adder u_ha_lh (.a(pp[1][2]), .b(pp[0][3]), .sum(s_lh), .carry(c_lh));
  half_adder u_ha_hh (.a(pp[3][2]), .b(pp[2][3]), .sum(s_hh), .carry(c_hh));

  // row 2: carry-save reduction; x/y are the two operands left per column
  logic x2, y2, x3, y3, x4, y4, x5, y5, x6, k3, k4, k5a, k5b, k6, k7;
  full_adder u_fa_m2  (.a(pp[1][1]), .b(pp[2][0]), .cin(c_ll), .sum(x2), .cout(k3));
  assign y2 = pp[0][2];
  half_adder u_ha_m3  (.a(s_hl), .b(s_lh), .sum(x3), .carry(k4));
  assign y3 = k3;
  full_adder u_fa_m4a (.a(pp[3][1]), .b(pp[1][3]), .cin(pp[2][2]), .sum(x4), .cout(k5a));
  full_adder u_fa_m4b (.a(c_hl),     .b(c_lh),     .cin(k4),       .sum(y4), .cout(k5b));
  half_adder u_ha_m5  (.a(k5a), .b(k5b), .sum(x5), .carry(k6));
  assign y5 = s_hh;
  full_adder u_fa_m6  (.a(pp[3][3]), .b(c_hh), .cin(k6), .sum(x6), .cout(k7));

  // row 3: ripple of the remaining two operands
  logic r3, r4, r5, r6, r7;
  half_adder u_ha_b2 (.a(x2), .b(y2),            .sum(p[2]), .carry(r3));
  full_adder u_fa_b3 (.a(x3), .b(y3), .cin(r3),  .sum(p[3]), .cout(r4));
  full_adder u_fa_b4 (.a(x4), .b(y4), .cin(r4),  .sum(p[4]), .cout(r5));
  full_adder u_fa_b5 (.a(x5), .b(y5), .cin(r5),  .sum(p[5]), .cout(r6));
  half_adder u_ha_b6 (.a(x6), .b(r6),            .sum(p[6]), .carry(r7));
  qca_xor2   u_xor_b7 (.a(k7), .b(r7), .y(p[7]));

  assign p[0] = pp[0][0];
endmodule
