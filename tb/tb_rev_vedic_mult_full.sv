// End-to-end testbench for the 128-bit multiplier at its default parameters
// (rev_vedic_mult with no parameter override). Each operand pair is applied,
// and s is compared with a 256-bit integer product; c3 must be 0.
//
// Stimulus: all-ones operands (product ff..fe00..01), zero and one, walking
// ones, a pair built so that the top-level adder 2 carries out (c2) while
// adder 1 does not, and 2000 random pairs, half of them with long runs of
// ones so that the carry bypass blocks engage. The testbench counts, at the
// top level of the recursion, how often each mechanism happened: adder 1
// carry out (c1), adder 2 carry out (c2), a bypass block of each of the three
// adders passing its carry straight through, and a block using its own
// ripple carry. Any of these that never happened counts as a failure.
// Watchdog: 20000 cycles.
module tb_rev_vedic_mult_full;
  localparam int N = 128;
  localparam int H = N / 2;

  logic           clk;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] s;
  logic           c3;
  int             checks = 0, failures = 0;
  int             n_c1 = 0, n_c2 = 0, n_byp1 = 0, n_byp2 = 0, n_byp3 = 0, n_ripple = 0;

  rev_vedic_mult dut (.a(a), .b(b), .s(s), .c3(c3));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] expected;
    a = av;
    b = bv;
    @(posedge clk);
    expected = (2*N)'(av) * (2*N)'(bv);
    checks += 2;
    if (s !== expected) begin
      failures++;
      $display("FAIL %h x %h\n  gave     %h\n  expected %h", av, bv, s, expected);
    end
    if (c3 !== 1'b0) begin
      failures++;
      $display("FAIL c3 set for %h x %h", av, bv);
    end
    if (dut.g_rec.c1) n_c1++;
    if (dut.g_rec.c2) n_c2++;
    n_byp1 += $countones(dut.g_rec.byp1);
    n_byp2 += $countones(dut.g_rec.byp2);
    n_byp3 += $countones(dut.g_rec.byp3);
    n_ripple += $countones(~dut.g_rec.byp1);
  endtask

  function automatic logic [N-1:0] rand128();
    return N'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    apply('1, '1);
    checks++;
    if (s !== {{(N-1){1'b1}}, 1'b0, {(N-1){1'b0}}, 1'b1}) begin
      failures++;
      $display("FAIL all-ones product %h", s);
    end
    apply('0, '1);
    apply((N)'(1), rand128());
    // al = bl = all ones, ah + bh = 2^H + 1: q1 + q2 = 2^N - 1 exactly, so
    // adder 1 does not carry and adder 2 carries when q0's upper half is added.
    apply({1'b1, {(H-1){1'b0}}, {H{1'b1}}}, {1'b1, {(H-2){1'b0}}, 1'b1, {H{1'b1}}});
    for (int i = 0; i < N; i++)
      apply((N)'(1) << i, ~((N)'(1) << (N - 1 - i)));
    for (int i = 0; i < 2000; i++) begin
      logic [N-1:0] av, bv;
      av = rand128();
      bv = rand128();
      if (i % 2 == 1) begin
        // Long runs of ones in both operands.
        av = av | (av << 1) | (av << 2) | (av << 3);
        bv = bv | (bv << 1) | (bv << 2) | (bv << 3);
      end
      apply(av, bv);
    end
    $display("top level: c1=%0d c2=%0d bypass add1=%0d add2=%0d add3=%0d ripple blocks=%0d",
             n_c1, n_c2, n_byp1, n_byp2, n_byp3, n_ripple);
    checks += 6;
    if (n_c1 == 0) begin failures++; $display("FAIL adder 1 never carried"); end
    if (n_c2 == 0) begin failures++; $display("FAIL adder 2 never carried"); end
    if (n_byp1 == 0) begin failures++; $display("FAIL adder 1 never bypassed"); end
    if (n_byp2 == 0) begin failures++; $display("FAIL adder 2 never bypassed"); end
    if (n_byp3 == 0) begin failures++; $display("FAIL adder 3 never bypassed"); end
    if (n_ripple == 0) begin failures++; $display("FAIL no block rippled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
