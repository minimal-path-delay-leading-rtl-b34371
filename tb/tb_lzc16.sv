// tb_lzc16: exhaustive test of the 16-bit slice counter in each of its
// three structures: W = 16 and 15 (fully parallel first stage), W = 14, 12
// and 9 (two LZC-8 halves), W = 8, 5 and 1 (one LZC-8 and constants).
// Every W-bit value is applied at the top of x with random bits below; the
// count must be the leading zeros of the W bits, or 15 with v = 1 for zero.
// The worked example of the design (LZC-16 of 2 is 14) is checked as well.
module tb_lzc16;
  localparam int NW = 8;
  localparam int WS [NW] = '{16, 15, 14, 12, 9, 8, 5, 1};

  logic [15:0] x;
  logic        v [NW];
  logic [3:0]  c [NW];
  int          checks = 0, failures = 0;

  for (genvar k = 0; k < NW; k++) begin : g_dut
    lzc16 #(.W(WS[k])) dut (.x(x), .v(v[k]), .c(c[k]));
  end

  function automatic int clz(input logic [15:0] a, input int n);
    for (int i = 15; i >= 16 - n; i--) if (a[i]) return 15 - i;
    return 15;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NW; k++) begin
      for (int i = 0; i < (1 << WS[k]); i++) begin
        logic [15:0] junk;
        junk = 16'($urandom) & (16'hFFFF >> WS[k]);
        x = (16'(i) << (16 - WS[k])) | junk;
        #1;
        checks++;
        if (c[k] != 4'(clz(x, WS[k])) || v[k] != (i == 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL W=%0d x=%b v=%b c=%0d exp=%0d", WS[k], x, v[k], c[k], clz(x, WS[k]));
        end
      end
    end
    x = 16'd2;
    #1;
    checks++;
    if (v[0] !== 1'b0 || c[0] != 4'd14) begin
      failures++;
      $display("FAIL example: v=%b c=%0d", v[0], c[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
