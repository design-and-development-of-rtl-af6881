// Carry bypass (carry skip) adder built from HNG ripple blocks.
//
// The WIDTH bits are cut into blocks of BLOCK bits (the last block takes
// what is left). Each block is an HNG ripple-carry adder. In parallel, a CNOT
// gate per bit forms the propagate signal p[i] = x[i] ^ y[i]; when every bit
// of a block propagates, the block's carry out equals its carry in, so a
// multiplexer passes the carry in straight to the next block instead of
// waiting for it to ripple through the block. When any propagate bit is 0
// the block's own ripple carry is used, which then does not depend on the
// carry in. The worst carry path therefore crosses one block, the chain of
// bypass multiplexers and the last block rather than all WIDTH gates.
//
// Replacing the plain HNG ripple-carry adder by this adder in the multiplier
// follows the design; the block size of 4 bits is this design's choice. The
// 16-bit default width is the first carry bypass adder the design names; the
// multiplier sets WIDTH to its own operand width.
//
// Interface: x, y, cin in; sum = low WIDTH bits of x + y + cin, cout = carry
// out. bypass[k] is 1 when block k passes its carry in straight through
// (observation output, not needed for the sum). Purely combinational.
module hng_carry_bypass_adder #(
  parameter int WIDTH = 16,
  parameter int BLOCK = 4
) (
  input  logic [WIDTH-1:0]                 x,
  input  logic [WIDTH-1:0]                 y,
  input  logic                             cin,
  output logic [WIDTH-1:0]                 sum,
  output logic                             cout,
  output logic [(WIDTH+BLOCK-1)/BLOCK-1:0] bypass
);
  localparam int NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  logic [WIDTH-1:0] prop;
  logic [WIDTH-1:0] gcopy;
  logic [NBLK:0]    bcarry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_prop
    cnot_gate u_cnot (.x(y[i]), .y(x[i]), .p(gcopy[i]), .q(prop[i]));
  end

  assign bcarry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int LO = k * BLOCK;
    localparam int W  = (LO + BLOCK > WIDTH) ? WIDTH - LO : BLOCK;
    logic ripple_cout;

    hng_ripple_adder #(.WIDTH(W)) u_rca (
      .x   (x[LO +: W]),
      .y   (y[LO +: W]),
      .cin (bcarry[k]),
      .sum (sum[LO +: W]),
      .cout(ripple_cout)
    );

    assign bypass[k]   = &prop[LO +: W];
    assign bcarry[k+1] = bypass[k] ? bcarry[k] : ripple_cout;
  end

  assign cout = bcarry[NBLK];
endmodule
