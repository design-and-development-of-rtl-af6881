// 2-bit x 2-bit Urdhva Tiryakbhyam ("vertically and crosswise") multiplier
// built only from reversible gates: five Peres gates and one CNOT gate.
//
// The three Urdhva steps for a = a1a0, b = b1b0 are
//   s0 = a0b0                    (vertical, right column)
//   s1 = a0b1 + a1b0             (crosswise), carry c1 = a0b1 & a1b0
//   s2 = a1b1 + c1               (vertical, left column), carry s3
// Peres gates 1-4 have c = 0, so each r output is one partial product.
// Peres gate 5 takes (a0b1, a1b0, a1b1): its q output is a0b1 ^ a1b0 = s1 and
// its r output is (a0b1 & a1b0) ^ a1b1 = c1 ^ a1b1 = s2. Because c1 can only
// be 1 when all four input bits are 1 (so a1b1 = 1 as well), the final carry
// s3 = a1b1 & c1 equals a1b1 ^ s2, which the CNOT gate forms.
//
// Cost: 6 gates, quantum cost 5*4 + 1 = 21, 4 constant inputs (the c inputs
// of Peres gates 1-4). The gate counts follow the published 2x2 reversible
// Vedic multiplier; the exact wiring above is this design's own.
//
// Interface: a[1:0], b[1:0] in, s[3:0] = a * b out. Purely combinational.
module rev_vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic a0b0, a0b1, a1b0, a1b1;
  // Outputs kept only for reversibility (garbage outputs).
  logic [1:0] g1, g2, g3, g4;
  logic       g5, g6;
  logic       s1, s2, s3;

  peres_gate u_pg1 (.a(a[0]), .b(b[0]), .c(1'b0), .p(g1[0]), .q(g1[1]), .r(a0b0));
  peres_gate u_pg2 (.a(a[0]), .b(b[1]), .c(1'b0), .p(g2[0]), .q(g2[1]), .r(a0b1));
  peres_gate u_pg3 (.a(a[1]), .b(b[0]), .c(1'b0), .p(g3[0]), .q(g3[1]), .r(a1b0));
  peres_gate u_pg4 (.a(a[1]), .b(b[1]), .c(1'b0), .p(g4[0]), .q(g4[1]), .r(a1b1));
  peres_gate u_pg5 (.a(a0b1), .b(a1b0), .c(a1b1), .p(g5), .q(s1), .r(s2));
  cnot_gate  u_cn1 (.x(a1b1), .y(s2), .p(g6), .q(s3));

  assign s = {s3, s2, s1, a0b0};
endmodule
