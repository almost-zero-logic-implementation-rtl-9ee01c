// trit_2to3: converts a trit from the 2-bit binary code (d1d0 = 00/01/10)
// to the 3-bit one-hot code used by the arithmetic (b2b1b0 = 001/010/100):
//   b2 = d1, b1 = d0, b0 = ~(b2 | b1).
// Sits at RAM read ports in the 2-bit storage variants (implementations 2
// and 3) and on the host write path of implementation 1. Combinational.
module trit_2to3
  import troika_pkg::*;
(
  input  trit2_t d,
  output trit3_t b
);
  assign b[2] = d[1];
  assign b[1] = d[0];
  assign b[0] = ~(d[1] | d[0]);
endmodule
