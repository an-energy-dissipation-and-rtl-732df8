// vedic_top_tb: end-to-end testbench for the whole design at its default
// parameters (8 x 8 main multiplier). It multiplies every pair of 8-bit
// operands on the main multiplier and, in parallel, every pair of 4-bit
// operands on the RCA-based 4 x 4 multiplier, comparing each product with the
// built-in multiplication.
// It also counts how often each carry path of the adder stages is used,
// worked out here from the operands alone, and counts a failure for a path
// that was never exercised:
//   - the N-bit RCA carries out into the half-adder incrementer;
//   - that carry ripples on past the incrementer's first bit;
//   - in the 4 x 4 RCA multiplier, RCA 1 (crosswise sum) carries out;
//   - in the 4 x 4 RCA multiplier, RCA 2 (adding LL[3:2]) carries out.
// A time-out counts as a failure.
module vedic_top_tb;
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  int unsigned checks = 0, failures = 0;
  int unsigned n_rca_carry = 0, n_inc_ripple = 0, n_c1 = 0, n_c2 = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic [3:0]     rca4_a, rca4_b;
  logic [7:0]     rca4_p;

  vedic_top dut (.a(a), .b(b), .p(p), .rca4_a(rca4_a), .rca4_b(rca4_b), .rca4_p(rca4_p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // carry events of the n x n combining stages, from the operands alone
  task automatic count_nxn_events();
    logic [N-1:0] w, x, y, z, t;
    logic [N+1:0] s3;
    logic [N:0]   rca_total;
    w = N'(a[H-1:0]) * N'(b[H-1:0]);
    x = N'(a[N-1:H]) * N'(b[H-1:0]);
    y = N'(a[H-1:0]) * N'(b[N-1:H]);
    z = N'(a[N-1:H]) * N'(b[N-1:H]);
    t = {z[H-1:0], w[N-1:H]};
    s3 = (N+2)'(x) + (N+2)'(y) + (N+2)'(t);
    rca_total = (N+1)'(s3 >> 1) + ((N+1)'(z[H]) << (N-1));
    if (rca_total[N]) begin
      n_rca_carry++;
      if (z[H+1]) n_inc_ripple++;
    end
  endtask

  task automatic count_rca4_events();
    logic [4:0] s1, s2;
    logic [3:0] ll;
    ll = 4'(rca4_a[1:0]) * 4'(rca4_b[1:0]);
    s1 = 5'(4'(rca4_a[3:2]) * 4'(rca4_b[1:0])) + 5'(4'(rca4_a[1:0]) * 4'(rca4_b[3:2]));
    s2 = 5'(s1[3:0]) + 5'(ll[3:2]);
    if (s1[4]) n_c1++;
    if (s2[4]) n_c2++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2*N)'(i);
      {rca4_a, rca4_b} = 8'(i);
      #1;
      check(p === (2*N)'(a) * (2*N)'(b), $sformatf("%0dx%0d: %0d*%0d=%0d", N, N, a, b, p));
      count_nxn_events();
      if (i < 256) begin
        check(rca4_p === 8'(rca4_a) * 8'(rca4_b),
              $sformatf("rca4: %0d*%0d=%0d", rca4_a, rca4_b, rca4_p));
        count_rca4_events();
      end
    end
    $display("events: rca_carry=%0d inc_ripple=%0d rca4_c1=%0d rca4_c2=%0d",
             n_rca_carry, n_inc_ripple, n_c1, n_c2);
    check(n_rca_carry  > 0, "N-bit RCA never carried into the incrementer");
    check(n_inc_ripple > 0, "incrementer carry never rippled");
    check(n_c1 > 0, "4x4 RCA 1 never carried out");
    check(n_c2 > 0, "4x4 RCA 2 never carried out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
