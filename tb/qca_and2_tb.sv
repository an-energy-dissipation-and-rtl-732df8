// qca_and2_tb: exhaustive self-checking testbench for qca_and2. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module qca_and2_tb;
  int unsigned checks = 0, failures = 0;
  logic [2-1:0] v;
  logic y;
  qca_and2 dut (.a(v[0]), .b(v[1]), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int unsigned i = 0; i < (1 << 2); i++) begin
      v = (2)'(i);
      #1;
      checks++;
      if (y !== (v == 2'b11)) begin
        failures++;
        $display("FAIL qca_and2: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
