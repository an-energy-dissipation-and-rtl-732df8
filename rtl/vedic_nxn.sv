// vedic_nxn: N-bit by N-bit Vedic multiplier. An N x N product is made of
// four N/2 x N/2 products joined by an adder stage (vedic_combine); applied
// again and again this unfolds into a tree whose leaves are gate-level 4 x 4
// Vedic multipliers (vedic_4x4_fa). N must be a power of two, at least 4.
//
// The tree is written level by level. Level 0 holds (N/4)^2 4 x 4 multipliers,
// one for every pair of 4-bit digits of a and b. Level k holds blocks of size
// S = 4*2^k: block (i, j) multiplies digit i of a by digit j of b, S bits
// each, and is formed by vedic_combine from the four level k-1 blocks
// (2i, 2j), (2i+1, 2j), (2i, 2j+1) and (2i+1, 2j+1), i.e. aL*bL, aH*bL,
// aL*bH and aH*bH. The last level has a single block: the product.
// For the default 8 x 8 that is four 4 x 4 multipliers and one combining
// stage (8-bit full-adder row, 8-bit RCA, 3-bit half-adder incrementer).
// RCA_LEAF selects the leaf topology: 0 (default) uses the gate-level 4 x 4
// multiplier, whose gate count the published 8 x 8 cost figures assume; 1
// uses the alternative 4 x 4 built from 2 x 2 multipliers and 4-bit RCAs.
// Both give the same product; the choice only changes the gate structure.
// Interface: a, b [N-1:0] in; p [2N-1:0] = a * b out. Combinational.
module vedic_nxn #(
  parameter int unsigned N        = 8,
  parameter bit          RCA_LEAF = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N) - 2;   // combining levels

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad
    $error("vedic_nxn: N must be a power of two and at least 4");
  end

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned S = 4 << k;     // operand width of this level
    localparam int unsigned M = N / S;      // blocks per operand
    logic [2*S-1:0] prod [M][M];            // prod[i][j] = a digit i * b digit j

    for (genvar i = 0; i < M; i++) begin : g_i
      for (genvar j = 0; j < M; j++) begin : g_j
        if (k == 0 && !RCA_LEAF) begin : g_leaf
          vedic_4x4_fa u_mul (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(prod[i][j]));
        end else if (k == 0) begin : g_leaf_rca
          vedic_4x4_rca u_mul (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(prod[i][j]));
        end else begin : g_node
          vedic_combine #(.N(S)) u_comb (
            .w(g_lvl[k-1].prod[2*i  ][2*j  ]),
            .x(g_lvl[k-1].prod[2*i+1][2*j  ]),
            .y(g_lvl[k-1].prod[2*i  ][2*j+1]),
            .z(g_lvl[k-1].prod[2*i+1][2*j+1]),
            .p(prod[i][j]));
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];
endmodule
