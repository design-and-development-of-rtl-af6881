// HNG gate: a 4-input, 4-output reversible gate that doubles as a full adder.
//
// Outputs: p = a, q = b, r = a ^ b ^ c, s = ((a ^ b) & c) ^ (a & b) ^ d.
// With d tied to 0, r is the full-adder sum of a, b, c and s is its carry,
// so a chain of HNG gates is a ripple-carry adder. The mapping is one-to-one
// over all sixteen input patterns. Quantum cost 6.
//
// Purely combinational, no clock. The fourth term of s is the input d, as in
// the usual definition of the HNG gate.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;

  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;
endmodule
