// half_adder_tb: exhaustive self-checking testbench for half_adder. It applies every input
// combination, compares the outputs with a reference computed here from the
// truth table, and prints one TB_RESULT line. A time-out counts as a failure.
module half_adder_tb;
  int unsigned checks = 0, failures = 0;
  logic [2-1:0] v;
  logic sum, carry;
  half_adder dut (.a(v[0]), .b(v[1]), .sum(sum), .carry(carry));
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
      if ({carry, sum} !== 2'($countones(v))) begin
        failures++;
        $display("FAIL half_adder: inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
