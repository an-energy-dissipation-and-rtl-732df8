// rca_tb: self-checking testbench for the ripple carry adder. The default
// 4-bit adder is checked exhaustively (all a, b and carry-in values); an
// 8-bit instance, the width the 8 x 8 multiplier uses, is checked with random
// operands including full carry ripples. A time-out counts as a failure.
module rca_tb;
  int unsigned checks = 0, failures = 0;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;

  rca dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 512; i++) begin
      {ci4, b4, a4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL rca4: %0d + %0d + %0d = %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int unsigned i = 0; i < 4000; i++) begin
      a8  = 8'($urandom);
      b8  = (i % 4 == 0) ? ~a8 : 8'($urandom);   // force long ripples
      ci8 = 1'($urandom);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(ci8)) begin
        failures++;
        $display("FAIL rca8: %0d + %0d + %0d = %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
