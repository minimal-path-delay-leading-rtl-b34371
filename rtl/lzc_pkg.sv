// lzc_pkg: shared types and first-stage Boolean functions of the LUT-oriented
// leading zero counter (LZC).
//
// A 6-bit slice is written x[5:0] with x[5] = X6 the most significant bit and
// x[0] = X1 the least significant one. For such a slice the four
// "leading-parity" signals are
//   LP1 = ~X6 & (X5 | (~X4 & (X3 | ~X2)))      bit 0 of the slice count
//   LP2 = ~X6 & ~X5 & (X4 | X3 | (~X2 & ~X1))  bit 1 of the slice count
//   LP3 = ~X6 & ~X5 & ~X4 & ~X3                bit 2 of the slice count
//   LP4 = ~X6 & ~X5 & ~X4 & ~X3 & ~X2 & ~X1    the slice is all zero
// where the slice count is the number of leading zeros of the slice. For an
// all-zero slice LP3..LP1 are all one. LP1 never looks at X1: when only X1
// could be set the count (5) and the all-zero code (7) are both odd.
// Each function fits one 6-input LUT; LP1 and LP3 share inputs and fit a
// single LUT6-2. These are the equations of the design; the struct types
// below are this implementation's own packaging of the signals.
package lzc_pkg;

  typedef struct packed {
    logic lp4;  // slice all zero
    logic lp3;  // count bit 2
    logic lp2;  // count bit 1
    logic lp1;  // count bit 0
  } lp_t;

  // Signals leaving the fully parallel first stage of an LZC-15/16
  // (LZC-8-Intermediate). H = X16..X11, L = X10..X6 (LP1, LP4) and
  // X8..X3 (LP2), LL = X5..X1 treated as a 6-bit slice with X6 = 0.
  typedef struct packed {
    logic lp1_h;
    logic lp2_h;
    logic lp3_h;
    logic lp4_h;
    logic lp1_l;
    logic lp2_l;
    logic lp4_l;
    logic lp1_ll;
    logic lp4_ll;
    logic x10;
    logic x9;
    logic x5;
  } inter_t;

  // LP1 and LP3 do not depend on the lowest bits, so they take only the
  // bits they use: lp1(X6..X2), lp3(X6..X3).
  function automatic logic lp1(input logic [4:0] x);
    return ~x[4] & (x[3] | (~x[2] & (x[1] | ~x[0])));
  endfunction

  function automatic logic lp2(input logic [5:0] x);
    return ~x[5] & ~x[4] & (x[3] | x[2] | (~x[1] & ~x[0]));
  endfunction

  function automatic logic lp3(input logic [3:0] x);
    return ~|x;
  endfunction

  function automatic logic lp4(input logic [5:0] x);
    return ~|x;
  endfunction

endpackage
