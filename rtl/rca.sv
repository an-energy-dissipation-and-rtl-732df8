// rca: ripple carry adder of WIDTH cascaded full adders. Bit i adds a[i], b[i]
// and the carry of bit i-1; the carry of the top bit leaves as cout. The
// default width of 4 is the 4-bit adder the multipliers use; the n x n
// multiplier also instantiates an n-bit one.
// Interface: a, b [WIDTH-1:0], cin in; sum [WIDTH-1:0], cout out.
// Combinational: the carry ripples through WIDTH full adders.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
