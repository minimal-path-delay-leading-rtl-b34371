// lzc: leading zero counter of any width N >= 2 (LZC-N).
//
// The input x[N-1:0] (x[N-1] most significant) is cut into S = ceil(N/16)
// slices of 16 bits from the top; the last slice holds the remaining
// N - 16*(S-1) bits and is built by lzc16 in the form that suits its width
// (LZC-15/16 fully parallel, LZC-9..14 as two LZC-8s, LZC-1..8 as one).
// The slice results are joined by a binary tree of lzc_merge stages:
// every level doubles the covered width and adds one count bit, using the
// high half's all-zero flag as the multiplexer select. Where a level has an
// odd number of nodes the unpaired low partner is the all-true constant
// (v = 1, count all ones), as an all-zero padding slice would give.
//
// Outputs: v = 1 when x is zero; c (CW = clog2(N) bits) is the number of
// leading zeros, all ones when v = 1. Purely combinational: two LUT levels
// for the slices plus one multiplexer level per tree level, ceil(log2(S)).
// The default N = 64 is the largest size the design was evaluated at.
module lzc #(
  parameter int unsigned N  = 64,
  localparam int unsigned CW = $clog2(N)
) (
  input  logic [N-1:0]  x,
  output logic          v,
  output logic [CW-1:0] c
);

  localparam int unsigned S  = (N + 15) / 16;      // number of slices
  localparam int unsigned L  = $clog2(S);          // merge levels
  localparam int unsigned S2 = 1 << L;             // slices incl. padding
  localparam int unsigned TW = 4 + L;              // tree count width
  localparam int unsigned WLAST = N - 16 * (S - 1);

  logic [16*S-1:0] xp;
  assign xp = {x, {(16 * S - N){1'b0}}};

  // Level 0: one result per slice, padding nodes set to the all-true
  // constants. Level l+1 is built from level l in its own generate scope.
  logic       v_s [S2];
  logic [3:0] c_s [S2];

  for (genvar i = 0; i < S2; i++) begin : g_slice
    if (i < S) begin : g_real
      lzc16 #(.W((i == S - 1) ? WLAST : 16)) u_lzc16 (
        .x(xp[16*(S-i)-1 -: 16]),
        .v(v_s[i]),
        .c(c_s[i])
      );
    end else begin : g_pad
      assign v_s[i] = 1'b1;
      assign c_s[i] = 4'hF;
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned NN = S2 >> (l + 1);   // nodes at this level
    logic         v_n [NN];
    logic [4+l:0] c_n [NN];

    for (genvar j = 0; j < NN; j++) begin : g_node
      logic         vh, vl;
      logic [3+l:0] ch, cl;
      if (l == 0) begin : g_from_slice
        assign vh = v_s[2*j];
        assign vl = v_s[2*j+1];
        assign ch = c_s[2*j];
        assign cl = c_s[2*j+1];
      end else begin : g_from_level
        assign vh = g_level[l-1].v_n[2*j];
        assign vl = g_level[l-1].v_n[2*j+1];
        assign ch = g_level[l-1].c_n[2*j];
        assign cl = g_level[l-1].c_n[2*j+1];
      end
      lzc_merge #(.W(4 + l)) u_merge (
        .v_h(vh),
        .c_h(ch),
        .v_l(vl),
        .c_l(cl),
        .v  (v_n[j]),
        .c  (c_n[j])
      );
    end
  end

  logic          v_root;
  logic [TW-1:0] c_root;

  if (L == 0) begin : g_root_slice
    assign v_root = v_s[0];
    assign c_root = c_s[0];
  end else begin : g_root_tree
    assign v_root = g_level[L-1].v_n[0];
    assign c_root = g_level[L-1].c_n[0];
  end

  // The tree count is never wider than needed except for N <= 8, where
  // the top bit(s) of the 4-bit slice count are dropped: they are only
  // set for the all-zero input, whose count is all ones in any width.
  assign v = v_root;
  assign c = c_root[CW-1:0];

  initial begin
    assert (N >= 2) else $error("lzc: N must be at least 2");
  end

endmodule
