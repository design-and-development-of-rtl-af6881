// Peres gate: a 3-input, 3-output reversible gate.
//
// Outputs: p = a, q = a ^ b, r = (a & b) ^ c. With c tied to 0 the r output is
// the AND of a and b, which is how the 2x2 multiplier forms its partial
// products; q then carries the XOR of the two inputs. The mapping from {a,b,c}
// to {p,q,r} is a permutation of the eight input patterns, so the inputs can
// always be recovered from the outputs. Quantum cost 4.
//
// Purely combinational, no clock. The gate equations are the standard Peres
// gate definition.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
