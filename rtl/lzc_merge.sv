// lzc_merge: combining stage of the LZC tree.
//
// Joins the results of a high half (v_h, c_h) and a low half (v_l, c_l),
// each covering 2**W bits, into the result of the 2**(W+1)-bit unit:
//   V        = V_H & V_L
//   Z[W]     = V_H
//   Z[W-1:0] = V_H ? Z_L : Z_H
// Every output bit depends on at most three signals, so it is one small LUT
// or a MUXF7/MUXF8 with V_H on the select. A missing low half is fed the
// all-true constants (v_l = 1, c_l all ones), which reproduces the
// all-zero convention (count all ones) of a padded input.
// Combinational.
module lzc_merge #(
  parameter int unsigned W = 3
) (
  input  logic         v_h,
  input  logic [W-1:0] c_h,
  input  logic         v_l,
  input  logic [W-1:0] c_l,
  output logic         v,
  output logic [W:0]   c
);

  always_comb begin
    v = v_h & v_l;
    c = {v_h, v_h ? c_l : c_h};
  end

endmodule
