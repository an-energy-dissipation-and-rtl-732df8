// maj5: five-input majority gate. The output is 1 when at least three of the
// five inputs are 1. The full adder uses it for its sum bit, which lets a full
// adder be made of two majority gates and one inverter (the gate itself is
// this design's reading of how that count is reached). It is written as
// a population count compared with 3, which is what a five-input QCA majority
// structure computes. Interface: a, b, c, d, e in; y out. Combinational.
module maj5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y
);
  logic [2:0] ones;
  assign ones = 3'(a) + 3'(b) + 3'(c) + 3'(d) + 3'(e);
  assign y    = (ones >= 3'd3);
endmodule
