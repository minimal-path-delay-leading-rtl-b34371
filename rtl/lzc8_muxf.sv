// lzc8_muxf: LZC-8 built for the slice multiplexers (MUXF7/MUXF8) of a
// Xilinx CLB, with no LUT feeding another LUT.
//
// Four LUTs see only the raw input x[7:0] (x[7] = X8):
//   LP3 and LP2 of the top six bits X8..X3  -> count bits 2 and 1
//   X7 | LP1(X6..X1)  (six inputs X7..X2, LP1 ignores X1)
//   all-zero of X6..X1
// The rest is 2:1 multiplexers whose select is an input bit:
//   LP1 = X8 ? 0 : (X7 | LP1(X6..X1))        one MUXF7
//   LP4 = X7 ? 0 : (X6..X1 == 0)             one MUXF7
//   V   = X8 ? 0 : LP4                       one MUXF8
// Outputs: v (all zero) and c = {LP3, LP2, LP1}, the leading zero count,
// all ones when x is zero. Combinational: one LUT level plus at most two
// multiplexer levels. The equations and the LUT/mux budget follow the
// design; which LUT feeds which multiplexer input is this implementation's
// reading of them.
module lzc8_muxf
  import lzc_pkg::*;
(
  input  logic [7:0] x,
  output logic       v,
  output logic [2:0] c
);

  logic lut_lp3, lut_lp2, lut_lp1, lut_z_lo;
  logic muxf7_lp4;

  always_comb begin
    // LUT level
    lut_lp3  = lzc_pkg::lp3(x[7:4]);
    lut_lp2  = lzc_pkg::lp2(x[7:2]);
    lut_lp1  = x[6] | lzc_pkg::lp1(x[5:1]);
    lut_z_lo = lzc_pkg::lp4(x[5:0]);
    // multiplexer level
    muxf7_lp4 = x[6] ? 1'b0 : lut_z_lo;
    v         = x[7] ? 1'b0 : muxf7_lp4;
    c[0]      = x[7] ? 1'b0 : lut_lp1;
    c[1]      = lut_lp2;
    c[2]      = lut_lp3;
  end

endmodule
