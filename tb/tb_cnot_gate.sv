// Self-checking testbench for cnot_gate: all four input patterns, outputs
// compared with p = x, q = x xor y, and the mapping checked to be one-to-one.
// Watchdog: 1000 cycles.
module tb_cnot_gate;
  logic clk;
  logic x, y, p, q;
  int   checks = 0, failures = 0;
  logic [3:0] seen = '0;

  cnot_gate dut (.x(x), .y(y), .p(p), .q(q));

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
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      @(posedge clk);
      checks++;
      if (p !== x || q !== (x != y)) begin
        failures++;
        $display("FAIL xy=%b pq=%b%b", {x, y}, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q});
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
