// maj3: three-input majority gate, the basic logic primitive of quantum-dot
// cellular automata. The output follows whichever value at least two of the
// three inputs hold: y = ab + bc + ca. Every AND, OR, XOR and adder in this
// design is built from this gate (plus maj5 and inverters), in the way a QCA
// layout builds them; fixing one input to 0 gives AND, to 1 gives OR.
// Interface: a, b, c in; y out. Purely combinational, no clock.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
