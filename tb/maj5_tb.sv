// maj5_tb: exhaustive self-checking testbench for maj5. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module maj5_tb;
  int unsigned checks = 0, failures = 0;
  logic [5-1:0] v;
  logic y;
  maj5 dut (.a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .e(v[4]), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int unsigned i = 0; i < (1 << 5); i++) begin
      v = (5)'(i);
      #1;
      checks++;
      if (y !== ($countones(v) >= 3)) begin
        failures++;
        $display("FAIL maj5: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
