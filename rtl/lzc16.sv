// lzc16: leading zero counter for one slice of up to 16 bits (LZC-W,
// 1 <= W <= 16), the base unit from which wider counters are built.
//
// The valid bits sit at the top of x: x[15] is the most significant bit
// and x[15-W+1] the least; bits below are ignored (tied to zero inside, so
// their logic disappears in synthesis). The structure depends on W:
//   W = 15, 16 : fully parallel first stage (lzc8_intermediate), then
//                  V_H = LP4_H & ~X10 & ~X9
//                  V   = LP4_H & LP4_L & LP4_LL
//                  Z3  = V_H
//                  Z2  = V_H ? (LP4_L & ~X5) : LP3_H
//                  Z1  = V_H ? LP2_L : LP2_H
//                  Z0  = LP4_H ? (LP4_L ? LP1_LL : LP1_L) : LP1_H
//                so only two LUT levels separate input and output.
//   W = 9..14  : an LZC-8 for each 8-bit half (lzc8_half) and one
//                lzc_merge stage.
//   W = 1..8   : an LZC-8 on the high half and lzc_merge with the missing
//                low half replaced by the all-true constants.
// Output: v = 1 when all W bits are zero; c = {Z3..Z0} the leading zero
// count, all ones when v = 1. Combinational. The equations and the split
// by W follow the design; zeroing absent bits (instead of hand-pruning the
// equations) is this implementation's way of applying its fallbacks.
module lzc16
  import lzc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [15:0] x,
  output logic        v,
  output logic [3:0]  c
);

  localparam logic [15:0] MASK = ~(16'hFFFF >> W);

  logic [15:0] xm;
  assign xm = x & MASK;

  if (W >= 15) begin : g_inter
    inter_t o;
    logic   v_h;

    lzc8_intermediate u_inter (
      .x(xm),
      .o(o)
    );

    always_comb begin
      v_h  = o.lp4_h & ~o.x10 & ~o.x9;
      v    = o.lp4_h & o.lp4_l & o.lp4_ll;
      c[3] = v_h;
      c[2] = v_h ? (o.lp4_l & ~o.x5) : o.lp3_h;
      c[1] = v_h ? o.lp2_l : o.lp2_h;
      c[0] = o.lp4_h ? (o.lp4_l ? o.lp1_ll : o.lp1_l) : o.lp1_h;
    end
  end else begin : g_pair
    logic       v_h, v_l;
    logic [2:0] c_h, c_l;

    lzc8_half u_high (
      .x(xm[15:8]),
      .v(v_h),
      .c(c_h)
    );

    if (W > 8) begin : g_low
      lzc8_half u_low (
        .x(xm[7:0]),
        .v(v_l),
        .c(c_l)
      );
    end else begin : g_nolow
      assign v_l = 1'b1;
      assign c_l = 3'b111;
    end

    lzc_merge #(.W(3)) u_merge (
      .v_h(v_h),
      .c_h(c_h),
      .v_l(v_l),
      .c_l(c_l),
      .v  (v),
      .c  (c)
    );
  end

  initial begin
    assert (W >= 1 && W <= 16)
      else $error("lzc16: W must be in 1..16");
  end

endmodule
