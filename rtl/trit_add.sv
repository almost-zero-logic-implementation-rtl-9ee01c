// trit_add: ternary (GF(3)) addition of two one-hot trits.
//
// With 0/1/2 coded as 001/010/100 the sum is a pure AND-OR network:
//   y2 = a0&b2 | a1&b1 | a2&b0   (sum is 2)
//   y1 = a0&b1 | a1&b0 | a2&b2   (sum is 1)
//   y0 = ~(y1 | y2)              (sum is 0)
// These are the equations of the design's trit arithmetic; the block is
// purely combinational (no clock, zero latency).
module trit_add
  import troika_pkg::*;
(
  input  trit3_t a,
  input  trit3_t b,
  output trit3_t y
);
  logic y1, y2;
  assign y2 = (a[0] & b[2]) | (a[1] & b[1]) | (a[2] & b[0]);
  assign y1 = (a[0] & b[1]) | (a[1] & b[0]) | (a[2] & b[2]);
  assign y  = {y2, y1, ~(y1 | y2)};
endmodule
