// Ripple-carry adder made of a chain of HNG gates.
//
// Bit i uses one HNG gate with a = x[i], b = y[i], c = carry in to bit i and
// d = 0: its r output is the sum bit and its s output the carry to bit i+1.
// The p and q outputs (copies of x[i] and y[i]) are garbage outputs kept only
// for reversibility. WIDTH gates give a WIDTH-bit adder; the 16-bit default
// is the "chain of 16 HNG gates" of the 16-bit multiplier.
//
// Interface: x, y, cin in; sum = low WIDTH bits of x + y + cin, cout = carry
// out of the top bit. Purely combinational; the carry ripples through all
// WIDTH gates.
module hng_ripple_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] gx, gy;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a(x[i]), .b(y[i]), .c(carry[i]), .d(1'b0),
      .p(gx[i]), .q(gy[i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
