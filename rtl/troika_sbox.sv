// troika_sbox: the Troika 3-trit S-box (one tryte in, one tryte out).
//
// The S-box is a three-round unbalanced Feistel network over GF(3):
//   F(x0,x1,x2) = (x0, x1, x0*x1 + x2),  pi(x0,x1,x2) = (x1,x2,x0),
//   rho(x0,x1,x2) = (x2,x1,x0),
//   s(x) = rho(F(pi(F(pi(F(x0-1, x1, x2)))))).
// Unrolled, with a = x0 - 1:
//   t1 = a*x1 + x2,  t2 = x1*t1 + a,  t3 = t1*t2 + x1,  s(x) = (t3, t2, t1).
// Each Feistel round is one trit_mul and one trit_add. Subtracting 1 in the
// one-hot code is a rotation of the three wires, so it costs no logic.
// x0 is the first trit of the tryte (lowest state address). Combinational.
module troika_sbox
  import troika_pkg::*;
(
  input  trit3_t x0,
  input  trit3_t x1,
  input  trit3_t x2,
  output trit3_t y0,
  output trit3_t y1,
  output trit3_t y2
);
  trit3_t a, p1, t1, p2, t2, p3, t3;

  // a = x0 - 1 = x0 + 2: value v moves to v+2 (0->2, 1->0, 2->1).
  assign a = {x0[0], x0[2], x0[1]};

  trit_mul u_m1 (.a(a),  .b(x1), .y(p1));
  trit_add u_a1 (.a(p1), .b(x2), .y(t1));
  trit_mul u_m2 (.a(x1), .b(t1), .y(p2));
  trit_add u_a2 (.a(p2), .b(a),  .y(t2));
  trit_mul u_m3 (.a(t1), .b(t2), .y(p3));
  trit_add u_a3 (.a(p3), .b(x1), .y(t3));

  assign y0 = t3;
  assign y1 = t2;
  assign y2 = t1;
endmodule
