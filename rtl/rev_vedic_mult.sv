// N-bit x N-bit reversible Vedic multiplier (Urdhva Tiryakbhyam), the top of
// the design. The default N = 128 gives the 128-bit multiplier
// a[127:0] x b[127:0] -> s[255:0].
//
// The multiplier is built recursively. With H = N/2, split a = {ah, al} and
// b = {bh, bl}; four H-bit multipliers form the partial products
//   q0 = al*bl,  q1 = ah*bl,  q2 = al*bh,  q3 = ah*bh
// (the vertical and crosswise products of the Urdhva method, one level up).
// Three N-bit carry bypass adders built from HNG gates combine them:
//   adder 1: {c1, t1} = q1 + q2                       (the crosswise sum)
//   adder 2: {c2, t2} = t1 + {H zeros, q0[N-1:H]}     (adds the carry-over of q0)
//   adder 3: {c3, t3} = q3 + {H-1 zeros, c1^c2, t2[N-1:H]}
//   s = {t3, t2[H-1:0], q0[H-1:0]}
// q1 + q2 + q0[N-1:H] < 2^(N+1), so c1 and c2 are never both 1 and a CNOT
// gate merges them (c1 ^ c2 = c1 | c2). c3 is the carry out of adder 3; the
// product always fits in 2N bits, so it is 0 for every input pair.
// The recursion stops at N = 2 with the 2x2 multiplier made of Peres and CNOT
// gates; there c3 is 0 as no adder is involved.
//
// Four half-size multipliers, three N-bit adders and the carry bypass
// adders follow the design; the way the partial products are aligned into
// the three adders and the CNOT merge of the two carries are this design's
// reading of the structure. The product is exact.
//
// Parameters: N (power of two, at least 2) and BYPASS_BLOCK, the block size
// of the carry bypass adders. Interface: a, b in; s = a * b, c3 out. Purely
// combinational, no clock and no latency.
//
// Lint: the unused signals are garbage outputs of reversible gates, the
// inner multipliers' c3 (always 0) and the adders' bypass flags. When this
// module is linted as the top of its own run, Verilator does not expand the
// recursive instances of itself and so reports q0..q3 as undriven and a, b
// as unused; under any parent module, and in simulation, the recursion is
// elaborated and those warnings do not appear.
module rev_vedic_mult #(
  parameter int N            = 128,
  parameter int BYPASS_BLOCK = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s,
  output logic           c3
);
  if (N == 2) begin : g_base
    rev_vedic_2x2 u_mul2 (.a(a), .b(b), .s(s));
    assign c3 = 1'b0;
  end else begin : g_rec
    localparam int H    = N / 2;
    localparam int NBLK = (N + BYPASS_BLOCK - 1) / BYPASS_BLOCK;

    logic [N-1:0]    q0, q1, q2, q3;
    logic [N-1:0]    t1, t2, t3;
    logic [N-1:0]    op2, op3;
    logic            c1, c2, cmerge, gc;
    logic            q0c, q1c, q2c, q3c;
    logic [NBLK-1:0] byp1, byp2, byp3;

    rev_vedic_mult #(.N(H), .BYPASS_BLOCK(BYPASS_BLOCK)) u_m0 (
      .a(a[H-1:0]), .b(b[H-1:0]), .s(q0), .c3(q0c));
    rev_vedic_mult #(.N(H), .BYPASS_BLOCK(BYPASS_BLOCK)) u_m1 (
      .a(a[N-1:H]), .b(b[H-1:0]), .s(q1), .c3(q1c));
    rev_vedic_mult #(.N(H), .BYPASS_BLOCK(BYPASS_BLOCK)) u_m2 (
      .a(a[H-1:0]), .b(b[N-1:H]), .s(q2), .c3(q2c));
    rev_vedic_mult #(.N(H), .BYPASS_BLOCK(BYPASS_BLOCK)) u_m3 (
      .a(a[N-1:H]), .b(b[N-1:H]), .s(q3), .c3(q3c));

    hng_carry_bypass_adder #(.WIDTH(N), .BLOCK(BYPASS_BLOCK)) u_add1 (
      .x(q1), .y(q2), .cin(1'b0), .sum(t1), .cout(c1), .bypass(byp1));

    assign op2 = {{H{1'b0}}, q0[N-1:H]};
    hng_carry_bypass_adder #(.WIDTH(N), .BLOCK(BYPASS_BLOCK)) u_add2 (
      .x(t1), .y(op2), .cin(1'b0), .sum(t2), .cout(c2), .bypass(byp2));

    cnot_gate u_cmerge (.x(c1), .y(c2), .p(gc), .q(cmerge));

    assign op3 = {{(H-1){1'b0}}, cmerge, t2[N-1:H]};
    hng_carry_bypass_adder #(.WIDTH(N), .BLOCK(BYPASS_BLOCK)) u_add3 (
      .x(q3), .y(op3), .cin(1'b0), .sum(t3), .cout(c3), .bypass(byp3));

    assign s = {t3, t2[H-1:0], q0[H-1:0]};
  end
endmodule
