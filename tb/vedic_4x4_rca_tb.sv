// vedic_4x4_rca_tb: exhaustive self-checking testbench for vedic_4x4_rca. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module vedic_4x4_rca_tb;
  int unsigned checks = 0, failures = 0;
  logic [8-1:0] v;
  logic [7:0] p;
  vedic_4x4_rca dut (.a(v[3:0]), .b(v[7:4]), .p(p));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int unsigned i = 0; i < (1 << 8); i++) begin
      v = (8)'(i);
      #1;
      checks++;
      if (p !== 8'(v[3:0]) * 8'(v[7:4])) begin
        failures++;
        $display("FAIL vedic_4x4_rca: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
