// lzc_lp6: first-stage LUT group of the LZC for one 6-bit slice.
//
// Computes the leading-parity signals LP1, LP2, LP3 and the all-zero signal
// LP4 of x[5:0] (x[5] = X6 most significant) as given by the truth table of
// the design (see lzc_pkg). Read as a number, {LP3, LP2, LP1} is the leading
// zero count of the slice (0..5), or 7 when the slice is all zero, and LP4
// flags that case. Purely combinational, one LUT level.
module lzc_lp6
  import lzc_pkg::*;
(
  input  logic [5:0] x,
  output lp_t        lp
);

  always_comb begin
    lp.lp1 = lzc_pkg::lp1(x[5:1]);
    lp.lp2 = lzc_pkg::lp2(x);
    lp.lp3 = lzc_pkg::lp3(x[5:2]);
    lp.lp4 = lzc_pkg::lp4(x);
  end

endmodule
