// full_adder_tb: exhaustive self-checking testbench for full_adder. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module full_adder_tb;
  int unsigned checks = 0, failures = 0;
  logic [3-1:0] v;
  logic sum, cout;
  full_adder dut (.a(v[0]), .b(v[1]), .cin(v[2]), .sum(sum), .cout(cout));
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
      if ({cout, sum} !== 2'($countones(v))) begin
        failures++;
        $display("FAIL full_adder: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
