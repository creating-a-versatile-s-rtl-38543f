// 2x2 matrix product over GF(2^8), the building block of MixColumns.
//
// With A = [A1 A2; A3 A4] and X = [B1 B3; B2 B4]:
//   C1 = A1*B1 ^ A2*B2    C2 = A1*B3 ^ A2*B4
//   C3 = A3*B1 ^ A4*B2    C4 = A3*B3 ^ A4*B4
// i.e. C = A x X, [C1 C2; C3 C4]. Eight GF(2^8) multipliers feed four
// Feynman gates that add the pairs. Purely combinational. The four equations
// and the multiplier/Feynman structure follow the reference drawing.
module mix_column_2x2 (
  input  logic [7:0] a1, a2, a3, a4,
  input  logic [7:0] b1, b2, b3, b4,
  output logic [7:0] c1, c2, c3, c4
);
  logic [7:0] m11, m22, m13, m24, m31, m42, m33, m44;
  logic [7:0] g1, g2, g3, g4;

  gf_mul8 u_m11 (.a(a1), .b(b1), .p(m11));
  gf_mul8 u_m22 (.a(a2), .b(b2), .p(m22));
  gf_mul8 u_m13 (.a(a1), .b(b3), .p(m13));
  gf_mul8 u_m24 (.a(a2), .b(b4), .p(m24));
  gf_mul8 u_m31 (.a(a3), .b(b1), .p(m31));
  gf_mul8 u_m42 (.a(a4), .b(b2), .p(m42));
  gf_mul8 u_m33 (.a(a3), .b(b3), .p(m33));
  gf_mul8 u_m44 (.a(a4), .b(b4), .p(m44));

  feynman_gate #(.W(8)) u_f1 (.a(m11), .b(m22), .p(g1), .q(c1));
  feynman_gate #(.W(8)) u_f2 (.a(m13), .b(m24), .p(g2), .q(c2));
  feynman_gate #(.W(8)) u_f3 (.a(m31), .b(m42), .p(g3), .q(c3));
  feynman_gate #(.W(8)) u_f4 (.a(m33), .b(m44), .p(g4), .q(c4));
endmodule
