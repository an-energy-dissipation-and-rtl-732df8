// vedic_nxn_tb: self-checking testbench for the recursive N x N Vedic
// multiplier. The default 8 x 8 instance, and an 8 x 8 instance with the
// RCA-based 4 x 4 leaves, are checked exhaustively (65,536 products each); a 4 x 4 instance exhaustively; 16 x 16 and 32 x 32 instances,
// which exercise two and three levels of recursion, with random operands and
// the corner values 0, 1 and all ones. Products are compared with the
// built-in multiplication. A time-out counts as a failure.
module vedic_nxn_tb;
  int unsigned checks = 0, failures = 0;

  logic [7:0]  a8,  b8;   logic [15:0] p8;
  logic [3:0]  a4,  b4;   logic [7:0]  p4;
  logic [15:0] p8r;
  logic [15:0] a16, b16;  logic [31:0] p16;
  logic [31:0] a32, b32;  logic [63:0] p32;

  vedic_nxn dut8 (.a(a8), .b(b8), .p(p8));
  vedic_nxn #(.N(8), .RCA_LEAF(1'b1)) dut8r (.a(a8), .b(b8), .p(p8r));
  vedic_nxn #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_nxn #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_nxn #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    for (int unsigned i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      check(p8 === 16'(a8) * 16'(b8), $sformatf("8x8 %0d*%0d=%0d", a8, b8, p8));
      check(p8r === 16'(a8) * 16'(b8), $sformatf("8x8 RCA leaves %0d*%0d=%0d", a8, b8, p8r));
    end
    for (int unsigned i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      check(p4 === 8'(a4) * 8'(b4), $sformatf("4x4 %0d*%0d=%0d", a4, b4, p4));
    end
    for (int unsigned i = 0; i < 20000; i++) begin
      case (i)
        0: begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
        1: begin a16 = '1; b16 = 1;  a32 = '1; b32 = 1;  end
        2: begin a16 = 0;  b16 = '1; a32 = 0;  b32 = '1; end
        default: begin
          a16 = 16'($urandom); b16 = 16'($urandom);
          a32 = $urandom;      b32 = $urandom;
        end
      endcase
      #1;
      check(p16 === 32'(a16) * 32'(b16), $sformatf("16x16 %0d*%0d=%0d", a16, b16, p16));
      check(p32 === 64'(a32) * 64'(b32), $sformatf("32x32 %0d*%0d=%0d", a32, b32, p32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
