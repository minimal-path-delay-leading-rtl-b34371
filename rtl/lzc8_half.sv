// lzc8_half: LZC-8 unit used as the high or the low half of an LZC-9..14
// (the "LZC-8-High" / "LZC-8-Low" units).
//
// The top six bits X8..X3 of the 8-bit slice go through one lzc_lp6 LUT
// group; the two bottom bits (called X10, X9 when this is the high half of a
// 16-bit slice) bypass the first stage. The second stage follows the
// equations of the design:
//   V  = LP4 & ~X2 & ~X1
//   Z2 = LP3
//   Z1 = LP2
//   Z0 = (LP1 & ~LP4) | (LP4 & ~X2)
// with X2, X1 the two bypassing bits. {Z2, Z1, Z0} is the leading zero count
// (0..7), and all ones with V = 1 when the slice is zero.
// Ports: x[7] is the most significant bit. Combinational, two LUT levels.
module lzc8_half
  import lzc_pkg::*;
(
  input  logic [7:0] x,
  output logic       v,
  output logic [2:0] c
);

  lp_t lp;

  lzc_lp6 u_lp (
    .x (x[7:2]),
    .lp(lp)
  );

  always_comb begin
    v    = lp.lp4 & ~x[1] & ~x[0];
    c[2] = lp.lp3;
    c[1] = lp.lp2;
    c[0] = (lp.lp1 & ~lp.lp4) | (lp.lp4 & ~x[1]);
  end

endmodule
