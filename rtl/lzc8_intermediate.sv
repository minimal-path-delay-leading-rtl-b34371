// lzc8_intermediate: fully parallel first LUT stage of an LZC-15/16
// ("LZC-8-Intermediate").
//
// Instead of cascading two LZC-8 units, the 16-bit input X16..X1
// (x[15] = X16) is cut into overlapping slices so that every first-stage
// signal is one LUT of at most six inputs:
//   H  = X16..X11 : LP1_H (X16..X12), LP3_H (X16..X13)  - one LUT6-2
//                   LP2_H (X16..X11), LP4_H (X16..X11)  - two LUT6
//   L  = X10..X6  : LP1_L, LP4_L                        - one LUT6-2
//        X8..X3   : LP2_L                               - one LUT6
//   LL = X5..X1   : LP1_LL, LP4_LL, computed as a 6-bit
//                   slice whose top bit is 0            - one LUT6-2
// X10, X9 and X5 bypass this stage for the second stage (lzc16).
// LP1 ignores the lowest bit of each slice (X11, X6 and X1 here), so the
// L slice for LP1 and LP4 is five bits wide; LP4_L therefore flags
// X10..X6 all zero, which is what the second-stage equations for V and Z0
// use. Combinational, one LUT level.
module lzc8_intermediate
  import lzc_pkg::*;
(
  input  logic [15:0] x,
  output inter_t      o
);

  logic [5:0] s_h, s_l, s_l2, s_ll;

  always_comb begin
    s_h  = x[15:10];          // X16..X11
    s_l  = {x[9:5], 1'b0};    // X10..X6, bottom position unused
    s_l2 = x[7:2];            // X8..X3
    s_ll = {1'b0, x[4:0]};    // 0, X5..X1

    o.lp1_h  = lzc_pkg::lp1(s_h[5:1]);
    o.lp2_h  = lzc_pkg::lp2(s_h);
    o.lp3_h  = lzc_pkg::lp3(s_h[5:2]);
    o.lp4_h  = lzc_pkg::lp4(s_h);
    o.lp1_l  = lzc_pkg::lp1(s_l[5:1]);
    o.lp4_l  = lzc_pkg::lp4(s_l);
    o.lp2_l  = lzc_pkg::lp2(s_l2);
    o.lp1_ll = lzc_pkg::lp1(s_ll[5:1]);
    o.lp4_ll = lzc_pkg::lp4(s_ll);
    o.x10    = x[9];
    o.x9     = x[8];
    o.x5     = x[4];
  end

endmodule
