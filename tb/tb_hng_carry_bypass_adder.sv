// Self-checking testbench for hng_carry_bypass_adder. Two instances: the
// default (16 bits, 4-bit blocks) and an 18-bit one whose last block is only
// two bits wide. Corner cases and random operands are compared with x + y +
// cin; the bypass outputs are compared with a block's all-propagate
// condition worked out here, and the testbench counts how often a block
// bypassed its carry and how often a bypassed carry in was 1, failing if
// either never happened. Watchdog: 20000 cycles.
module tb_hng_carry_bypass_adder;
  localparam int W1 = 16;
  localparam int W2 = 18;
  localparam int B  = 4;

  logic          clk;
  logic [W1-1:0] x1, y1, s1;
  logic [W2-1:0] x2, y2, s2;
  logic          ci, co1, co2;
  logic [3:0]    byp1;
  logic [4:0]    byp2;
  int            checks = 0, failures = 0;
  int            n_bypass = 0, n_bypass_carry = 0;

  hng_carry_bypass_adder dut1 (
    .x(x1), .y(y1), .cin(ci), .sum(s1), .cout(co1), .bypass(byp1));
  hng_carry_bypass_adder #(.WIDTH(W2), .BLOCK(B)) dut2 (
    .x(x2), .y(y2), .cin(ci), .sum(s2), .cout(co2), .bypass(byp2));

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

  // Expected bypass flags: block k bypasses when x ^ y is all ones there.
  function automatic logic [4:0] want_bypass(input logic [W2-1:0] xv,
                                             input logic [W2-1:0] yv, input int w);
    logic [W2-1:0] p;
    logic [4:0]    f;
    p = xv ^ yv;
    f = '0;
    for (int k = 0; k * B < w; k++) begin
      f[k] = 1'b1;
      for (int i = k * B; i < k * B + B && i < w; i++)
        if (!p[i]) f[k] = 1'b0;
    end
    return f;
  endfunction

  task automatic apply(input logic [W2-1:0] xv, input logic [W2-1:0] yv, input logic cv);
    logic [W1:0] e1;
    logic [W2:0] e2;
    logic [4:0]  f1, f2;
    logic [W2:0] carries;
    x1 = xv[W1-1:0];
    y1 = yv[W1-1:0];
    x2 = xv;
    y2 = yv;
    ci = cv;
    @(posedge clk);
    e1 = (W1+1)'(x1) + (W1+1)'(y1) + (W1+1)'(cv);
    e2 = (W2+1)'(xv) + (W2+1)'(yv) + (W2+1)'(cv);
    f1 = want_bypass(W2'(x1), W2'(y1), W1);
    f2 = want_bypass(xv, yv, W2);
    checks += 4;
    if ({co1, s1} !== e1) begin
      failures++;
      $display("FAIL w16 %h + %h + %b gave %h, expected %h", x1, y1, cv, {co1, s1}, e1);
    end
    if ({co2, s2} !== e2) begin
      failures++;
      $display("FAIL w18 %h + %h + %b gave %h, expected %h", xv, yv, cv, {co2, s2}, e2);
    end
    if (byp1 !== f1[3:0]) begin
      failures++;
      $display("FAIL w16 bypass %b, expected %b", byp1, f1[3:0]);
    end
    if (byp2 !== f2) begin
      failures++;
      $display("FAIL w18 bypass %b, expected %b", byp2, f2);
    end
    // Carry into each bit of the 18-bit sum: (x ^ y ^ sum) gives it.
    carries = {1'b0, xv ^ yv ^ e2[W2-1:0]};
    for (int k = 0; k < 5; k++) begin
      if (f2[k]) begin
        n_bypass++;
        if (carries[k * B]) n_bypass_carry++;
      end
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);        // every block bypasses, carry in skips to the end
    apply('1, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply(18'h0fff0, 18'h00010, 1'b0);
    apply(18'h2aaaa, 18'h15555, 1'b1);
    for (int i = 0; i < 3000; i++) begin
      logic [W2-1:0] xv, yv;
      xv = W2'($urandom);
      // Half of the time make y nearly the complement of x so blocks propagate.
      yv = ($urandom_range(1) == 1) ? (~xv ^ W2'(1 << $urandom_range(W2 - 1))) : W2'($urandom);
      apply(xv, yv, 1'($urandom));
    end
    $display("bypassed blocks: %0d, of which carrying a 1: %0d", n_bypass, n_bypass_carry);
    checks += 2;
    if (n_bypass == 0) failures++;
    if (n_bypass_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
