// tb_lzc8_intermediate: exhaustive test (all 2**16 inputs) of the fully
// parallel first stage of the LZC-15/16. Each output is compared with what
// it must mean for the count:
//   LP4_H/LP4_L/LP4_LL : X16..X11 / X10..X6 / X5..X1 all zero
//   LP1_H, LP2_H, LP3_H : bits 0..2 of the count within X16..X11 (7 if zero)
//   LP2_L               : bit 1 of the count within X8..X3 (7 if zero)
//   LP1_L               : bit 0 of the count within X10..X5, 1 if X10..X6 = 0
//   LP1_LL              : bit 0 of (1 + count within X5..X1), 1 if X5..X2 = 0
//   X10, X9, X5         : passed through
module tb_lzc8_intermediate;
  import lzc_pkg::*;

  logic [15:0] x;
  inter_t      o;
  int          checks = 0, failures = 0;

  lzc8_intermediate dut (.x(x), .o(o));

  // leading zeros of the n-bit value a[n-1:0]; 7 when zero
  function automatic int clz(input logic [7:0] a, input int n);
    for (int i = n - 1; i >= 0; i--) if (a[i]) return n - 1 - i;
    return 7;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inter_t e;
    int     ch;
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i);
      #1;
      ch = clz(8'(x[15:10]), 6);
      e.lp1_h  = ch[0];
      e.lp2_h  = ch[1];
      e.lp3_h  = ch[2];
      e.lp4_h  = (x[15:10] == 0);
      e.lp4_l  = (x[9:5] == 0);
      e.lp1_l  = (x[9:5] == 0) ? 1'b1 : 1'(clz(8'(x[9:4]), 6));
      e.lp2_l  = 1'(clz(8'(x[7:2]), 6) >> 1);
      e.lp4_ll = (x[4:0] == 0);
      e.lp1_ll = (x[4:1] == 0) ? 1'b1 : 1'(1 + clz(8'(x[4:0]), 5));
      e.x10    = x[9];
      e.x9     = x[8];
      e.x5     = x[4];
      checks++;
      if (o != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b got=%b exp=%b", x, o, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
