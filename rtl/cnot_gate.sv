// CNOT (Feynman) gate: a 2-input, 2-output reversible gate.
//
// Outputs: p = x (the control passes through) and q = x ^ y. Used to copy a
// signal (y = 0) or to XOR two signals without losing either. Quantum cost 1.
//
// Purely combinational, no clock.
module cnot_gate (
  input  logic x,
  input  logic y,
  output logic p,
  output logic q
);
  assign p = x;
  assign q = x ^ y;
endmodule
