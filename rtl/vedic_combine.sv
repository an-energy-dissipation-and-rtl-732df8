// vedic_combine: joins the four N/2 x N/2 sub-products of an N x N Vedic
// multiplier into the 2N-bit product. With H = N/2, a = {aH, aL} and
// b = {bH, bL}, the inputs are
//   w = aL*bL, x = aH*bL, y = aL*bH, z = aH*bH   (each N bits)
// and a*b = z<<N + (x + y)<<H + w. The three operands that overlap at
// weight 2^H are x, y and t = {z[H-1:0], w[N-1:H]}. Three stages add them:
//   N-bit full-adder row   one full adder per bit adds x, y and t in
//                          carry-save form: sums ps, carries gs;
//   N-bit RCA              adds {z[H], ps[N-1:1]} and gs, i.e. each carry
//                          gs[i] to the sum one place up; ps[0] needs no add;
//   (H-1)-bit incrementer  a half-adder chain adds the RCA's carry out to
//                          z[N-1:H+1].
// Product bits: p[H-1:0] = w[H-1:0], p[H] = ps[0], p[3H:H+1] = RCA sum,
// p[2N-1:3H+1] = incrementer sum. The incrementer's carry out is always 0
// (the product fits 2N bits) and is left unused.
// The three stages and their widths (N-bit full adder, N-bit RCA, an
// (N/2-1)-bit adder of half adders) follow the published n-bit structure; the
// exact bit alignment is worked out here from the arithmetic.
// Interface: w, x, y, z [N-1:0] in; p [2N-1:0] out. Combinational.
module vedic_combine #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   w,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [N-1:0]   z,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] t, ps, gs, rsum;
  logic         rcout;
  logic         inc_cout;  // always 0

  assign t = {z[H-1:0], w[N-1:H]};
  for (genvar i = 0; i < N; i++) begin : g_fa_row
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(t[i]), .sum(ps[i]), .cout(gs[i]));
  end

  rca #(.WIDTH(N)) u_rca (.a({z[H], ps[N-1:1]}), .b(gs), .cin(1'b0),
                          .sum(rsum), .cout(rcout));
  ha_chain #(.WIDTH(H - 1)) u_inc (.a(z[N-1:H+1]), .cin(rcout),
                                   .sum(p[2*N-1:3*H+1]), .cout(inc_cout));

  assign p[H-1:0]   = w[H-1:0];
  assign p[H]       = ps[0];
  assign p[3*H:H+1] = rsum;
endmodule
