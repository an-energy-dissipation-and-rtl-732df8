// maj3_tb: exhaustive self-checking testbench for maj3. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module maj3_tb;
  int unsigned checks = 0, failures = 0;
  logic [3-1:0] v;
  logic y;
  maj3 dut (.a(v[0]), .b(v[1]), .c(v[2]), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int unsigned i = 0; i < (1 << 3); i++) begin
      v = (3)'(i);
      #1;
      checks++;
      if (y !== ($countones(v) >= 2)) begin
        failures++;
        $display("FAIL maj3: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
