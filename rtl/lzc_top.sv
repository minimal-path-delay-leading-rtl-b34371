// lzc_top: registered leading zero counters.
//
// The counters are purely combinational; in use they sit between two
// register stages, and the path from the input register to the output
// register is the one whose delay the design minimises. This top provides
// exactly that arrangement for two units side by side:
//   * lzc       : LZC-N of any width (default N = 64), 16-bit slices with a
//                 fully parallel first stage and a multiplexer tree;
//   * lzc8_muxf : the 8-bit counter that uses the slice multiplexers
//                 (MUXF7/MUXF8) instead of a second LUT level.
// Each has its own valid bit. Timing: a word presented with in_valid at
// rising edge k is captured at edge k and its result, with out_valid,
// appears after edge k+1 (latency 2 edges, one result per cycle, no
// stalls). rst_n is an active-low synchronous reset that clears the valid
// bits and the registers. The register stages and the valid bits are this
// implementation's choice; the counters inside follow the design.
module lzc_top #(
  parameter int unsigned N = 64,
  localparam int unsigned CW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // LZC-N
  input  logic          in_valid,
  input  logic [N-1:0]  x,
  output logic          out_valid,
  output logic          v,
  output logic [CW-1:0] c,
  // LZC-8, multiplexer variant
  input  logic          in_valid8,
  input  logic [7:0]    x8,
  output logic          out_valid8,
  output logic          v8,
  output logic [2:0]    c8
);

  logic [N-1:0]  x_q;
  logic          val_q;
  logic          v_d;
  logic [CW-1:0] c_d;

  logic [7:0]    x8_q;
  logic          val8_q;
  logic          v8_d;
  logic [2:0]    c8_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q    <= '0;
      val_q  <= 1'b0;
      x8_q   <= '0;
      val8_q <= 1'b0;
    end else begin
      x_q    <= x;
      val_q  <= in_valid;
      x8_q   <= x8;
      val8_q <= in_valid8;
    end
  end

  lzc #(.N(N)) u_lzc (
    .x(x_q),
    .v(v_d),
    .c(c_d)
  );

  lzc8_muxf u_lzc8 (
    .x(x8_q),
    .v(v8_d),
    .c(c8_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      v          <= 1'b0;
      c          <= '0;
      out_valid8 <= 1'b0;
      v8         <= 1'b0;
      c8         <= '0;
    end else begin
      out_valid  <= val_q;
      v          <= v_d;
      c          <= c_d;
      out_valid8 <= val8_q;
      v8         <= v8_d;
      c8         <= c8_d;
    end
  end

endmodule
