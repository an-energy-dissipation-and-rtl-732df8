// vedic_4x4_rca: 4-bit by 4-bit Vedic multiplier built from four 2x2 Vedic
// multipliers and three 4-bit ripple carry adders.
//
// With a = {aH, aL} and b = {bH, bL} (2-bit halves), the four 2x2 products
// are LL = aL*bL, HL = aH*bL, LH = aL*bH and HH = aH*bH, and
//   a*b = HH<<4 + (HL + LH)<<2 + LL.
//   RCA 1  adds the two crosswise products HL + LH (sum s1, carry c1);
//   RCA 2  adds s1 and the upper half of LL, LL[3:2]; its low two sum bits
//          are p[3:2];
//   RCA 3  adds HH and {0, c1 or c2, s2[3:2]}, giving p[7:4].
// p[1:0] are LL[1:0] directly. c1 and c2 have the same weight (2^6) and are
// never both 1 (s1 >= 16 forces s1[3:0] <= 2, so RCA 2 cannot then carry),
// so a majority-gate OR merges them. How the carries of RCA 1 and RCA 2 enter
// RCA 3 is this design's reading of the block diagram; the carry out of
// RCA 3 is always 0 and is left unconnected.
// Interface: a, b [3:0] in; p [7:0] = a * b out. Combinational.
module vedic_4x4_rca (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] m_ll, m_hl, m_lh, m_hh;
  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(m_ll));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(m_hl));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(m_lh));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(m_hh));

  logic [3:0] s1, s2;
  logic       c1, c2, c_mid, c_top;  // c_top is always 0
  rca #(.WIDTH(4)) u_rca1 (.a(m_hl), .b(m_lh), .cin(1'b0), .sum(s1), .cout(c1));
  rca #(.WIDTH(4)) u_rca2 (.a(s1), .b({2'b00, m_ll[3:2]}), .cin(1'b0), .sum(s2), .cout(c2));
  qca_or2 u_cmerge (.a(c1), .b(c2), .y(c_mid));
  rca #(.WIDTH(4)) u_rca3 (.a(m_hh), .b({1'b0, c_mid, s2[3:2]}), .cin(1'b0),
                           .sum(p[7:4]), .cout(c_top));

  assign p[1:0] = m_ll[1:0];
  assign p[3:2] = s2[1:0];
endmodule
