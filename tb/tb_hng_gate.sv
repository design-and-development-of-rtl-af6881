// Self-checking testbench for hng_gate. Applies all sixteen input patterns,
// compares the outputs with the HNG gate equations, checks that the mapping
// is one-to-one, and that with d = 0 the r and s outputs are the sum and
// carry of a + b + c. Watchdog: 1000 cycles.
module tb_hng_gate;
  logic clk;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  logic [15:0] seen = '0;
  int   total;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== total[0] || s !== (total[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b pqrs=%b%b%b%b", {a, b, c, d}, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b repeated: not reversible", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
