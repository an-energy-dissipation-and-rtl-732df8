// vedic_top: the Vedic multiplier design at its top level.
// It holds two multipliers side by side, each with its own ports:
//   - the main N x N multiplier (default 8 x 8), vedic_nxn: four 4 x 4
//     gate-level multipliers (vedic_4x4_fa) joined by a full-adder row, an
//     N-bit ripple carry adder and a half-adder incrementer;
//   - the alternative 4 x 4 multiplier built from 2 x 2 Vedic multipliers
//     and three 4-bit ripple carry adders (vedic_4x4_rca).
// Both are purely combinational, as the logic of a QCA layout is; the four
// phase QCA clock that moves values through a physical layout has no
// counterpart here.
// Interface: a, b [N-1:0] -> p [2N-1:0] = a*b; rca4_a, rca4_b [3:0] ->
// rca4_p [7:0] = rca4_a*rca4_b.
module vedic_top #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  input  logic [3:0]     rca4_a,
  input  logic [3:0]     rca4_b,
  output logic [7:0]     rca4_p
);
  vedic_nxn #(.N(N)) u_nxn (.a(a), .b(b), .p(p));
  vedic_4x4_rca u_rca4 (.a(rca4_a), .b(rca4_b), .p(rca4_p));
endmodule
