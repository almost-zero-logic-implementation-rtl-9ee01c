// trit_mul: ternary (GF(3)) multiplication of two one-hot trits.
//
// With 0/1/2 coded as 001/010/100:
//   y0 = a0 | b0                 (either factor is 0)
//   y1 = a1&b1 | a2&b2           (1*1 = 2*2 = 1)
//   y2 = ~(y1 | y0)              (1*2 = 2*1 = 2)
// These are the equations of the design's trit arithmetic; purely
// combinational.
module trit_mul
  import troika_pkg::*;
(
  input  trit3_t a,
  input  trit3_t b,
  output trit3_t y
);
  logic y0, y1;
  assign y0 = a[0] | b[0];
  assign y1 = (a[1] & b[1]) | (a[2] & b[2]);
  assign y  = {~(y1 | y0), y1, y0};
endmodule
