// Self-checking testbench for peres_gate. Applies all eight input patterns,
// compares p, q, r with the Peres gate equations, and checks that the eight
// output patterns are all different (the gate is reversible). A watchdog
// ends the run with a failure if it has not finished after 1000 cycles.
module tb_peres_gate;
  logic clk;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen = '0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      // Expected values from the truth table: P=A, Q=A xor B, R=AB xor C.
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL abc=%b pqr=%b%b%b", {a, b, c}, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b repeated: not reversible", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
