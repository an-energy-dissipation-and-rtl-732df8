// vedic_combine_tb: self-checking testbench for the stage that joins four
// half-size products. For every pair of 8-bit operands (default N = 8) it
// forms the four 4 x 4 sub-products with the built-in multiplication, feeds
// them in, and checks the 16-bit result against a*b. A 16-bit instance is
// checked the same way with random operands and the all-ones corner.
// A time-out counts as a failure.
module vedic_combine_tb;
  int unsigned checks = 0, failures = 0;

  logic [7:0]  a8, b8, w8, x8, y8, z8;
  logic [15:0] p8;
  logic [15:0] a16, b16, w16, x16, y16, z16;
  logic [31:0] p16;

  vedic_combine dut8 (.w(w8), .x(x8), .y(y8), .z(z8), .p(p8));
  vedic_combine #(.N(16)) dut16 (.w(w16), .x(x16), .y(y16), .z(z16), .p(p16));

  assign w8 = 8'(a8[3:0]) * 8'(b8[3:0]);
  assign x8 = 8'(a8[7:4]) * 8'(b8[3:0]);
  assign y8 = 8'(a8[3:0]) * 8'(b8[7:4]);
  assign z8 = 8'(a8[7:4]) * 8'(b8[7:4]);
  assign w16 = 16'(a16[7:0])  * 16'(b16[7:0]);
  assign x16 = 16'(a16[15:8]) * 16'(b16[7:0]);
  assign y16 = 16'(a16[7:0])  * 16'(b16[15:8]);
  assign z16 = 16'(a16[15:8]) * 16'(b16[15:8]);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int unsigned i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL N=8: %0d*%0d -> %0d", a8, b8, p8);
      end
    end
    for (int unsigned i = 0; i < 10000; i++) begin
      if (i == 0) begin
        a16 = '1; b16 = '1;
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom);
      end
      #1;
      checks++;
      if (p16 !== 32'(a16) * 32'(b16)) begin
        failures++;
        $display("FAIL N=16: %0d*%0d -> %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
