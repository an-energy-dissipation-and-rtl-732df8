// ha_chain: WIDTH-bit incrementer made of a chain of half adders. It adds the
// single bit cin to a: bit i adds a[i] and the carry of bit i-1. In the n x n
// multiplier it carries the final carry into the top bits of the high
// product (the (n/2-1)-bit adder stage, 3 bits for an 8 x 8 multiplier).
// Interface: a [WIDTH-1:0], cin in; sum [WIDTH-1:0], cout out. Combinational.
module ha_chain #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    half_adder u_ha (.a(a[i]), .b(c[i]), .sum(sum[i]), .carry(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
