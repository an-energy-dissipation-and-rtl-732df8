// vedic_2x2_tb: exhaustive self-checking testbench for vedic_2x2. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module vedic_2x2_tb;
  int unsigned checks = 0, failures = 0;
  logic [4-1:0] v;
  logic [3:0] p;
  vedic_2x2 dut (.a(v[1:0]), .b(v[3:2]), .p(p));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int unsigned i = 0; i < (1 << 4); i++) begin
      v = (4)'(i);
      #1;
      checks++;
      if (p !== 4'(v[1:0]) * 4'(v[3:2])) begin
        failures++;
        $display("FAIL vedic_2x2: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
