// Self-checking testbench for rev_vedic_mult at the smaller widths of the
// multiplier family: 4, 8, 16, 32 and 64 bits, one instance each, all driven
// from the same 64-bit operands (each takes the low N bits). The 4-bit
// multiplier is checked exhaustively; every width is then checked on its
// all-ones operands (for 32 bits: ffffffff x ffffffff = fffffffe00000001),
// on walking-one operands and on 3000 random pairs. Each product is compared
// with a 128-bit integer product, and c3 must stay 0. Watchdog: 20000 cycles.
module tb_rev_vedic_mult_widths;
  logic        clk;
  logic [63:0] a, b;
  logic [7:0]   s4;
  logic [15:0]  s8;
  logic [31:0]  s16;
  logic [63:0]  s32;
  logic [127:0] s64;
  logic [4:0]   c3;
  int           checks = 0, failures = 0;

  rev_vedic_mult #(.N(4))  dut4  (.a(a[3:0]),  .b(b[3:0]),  .s(s4),  .c3(c3[0]));
  rev_vedic_mult #(.N(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .s(s8),  .c3(c3[1]));
  rev_vedic_mult #(.N(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .s(s16), .c3(c3[2]));
  rev_vedic_mult #(.N(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .s(s32), .c3(c3[3]));
  rev_vedic_mult #(.N(64)) dut64 (.a(a),       .b(b),       .s(s64), .c3(c3[4]));

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

  function automatic logic [127:0] mask_mul(input logic [63:0] x, input logic [63:0] y,
                                            input int n);
    logic [127:0] xm, ym;
    xm = (n == 64) ? {64'b0, x} : {64'b0, x & ((64'd1 << n) - 64'd1)};
    ym = (n == 64) ? {64'b0, y} : {64'b0, y & ((64'd1 << n) - 64'd1)};
    return xm * ym;
  endfunction

  task automatic check_all();
    @(posedge clk);
    checks += 6;
    if (128'(s4) !== mask_mul(a, b, 4)) begin
      failures++;
      $display("FAIL N=4 %h x %h gave %h", a[3:0], b[3:0], s4);
    end
    if (128'(s8) !== mask_mul(a, b, 8)) begin
      failures++;
      $display("FAIL N=8 %h x %h gave %h", a[7:0], b[7:0], s8);
    end
    if (128'(s16) !== mask_mul(a, b, 16)) begin
      failures++;
      $display("FAIL N=16 %h x %h gave %h", a[15:0], b[15:0], s16);
    end
    if (128'(s32) !== mask_mul(a, b, 32)) begin
      failures++;
      $display("FAIL N=32 %h x %h gave %h", a[31:0], b[31:0], s32);
    end
    if (s64 !== mask_mul(a, b, 64)) begin
      failures++;
      $display("FAIL N=64 %h x %h gave %h", a, b, s64);
    end
    if (c3 !== '0) begin
      failures++;
      $display("FAIL c3=%b", c3);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 64'(i % 16);
      b = 64'(i / 16);
      check_all();
    end
    a = '1;
    b = '1;
    check_all();
    checks++;
    if (s32 !== 64'hfffffffe00000001) begin
      failures++;
      $display("FAIL 32-bit all ones gave %h", s32);
    end
    for (int i = 0; i < 64; i++) begin
      a = 64'd1 << i;
      b = ~(64'd1 << (63 - i));
      check_all();
    end
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
