// Self-checking testbench for rev_vedic_2x2: all sixteen operand pairs,
// product compared with the integer product a * b. Includes the example
// 2 x 3 = 6 and 3 x 3 = 9, the only case that sets s[3]. Watchdog: 1000
// cycles.
module tb_rev_vedic_2x2;
  logic       clk;
  logic [1:0] a, b;
  logic [3:0] s;
  int         checks = 0, failures = 0;

  rev_vedic_2x2 dut (.a(a), .b(b), .s(s));

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
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        @(posedge clk);
        checks++;
        if (int'(s) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d gave %0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
