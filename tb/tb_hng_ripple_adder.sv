// Self-checking testbench for hng_ripple_adder at its default width (16).
// Exercises corner cases (all ones plus carry in, a carry rippling through
// all sixteen gates) and 2000 random operand sets, comparing {cout, sum} with
// x + y + cin computed in 17-bit arithmetic. Watchdog: 10000 cycles.
module tb_hng_ripple_adder;
  localparam int W = 16;

  logic         clk;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  logic [W:0]   expected;
  int           checks = 0, failures = 0;

  hng_ripple_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] xv, input logic [W-1:0] yv, input logic cv);
    x   = xv;
    y   = yv;
    cin = cv;
    @(posedge clk);
    expected = (W+1)'(xv) + (W+1)'(yv) + (W+1)'(cv);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %b gave %h, expected %h", xv, yv, cv, {cout, sum}, expected);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);   // carry through every gate
    apply('1, '1, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h5555, 16'haaaa, 1'b1);
    for (int i = 0; i < 2000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
