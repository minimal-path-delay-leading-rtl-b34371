// tb_lzc_lp6: exhaustive test of the 6-bit leading-parity LUT group.
// For all 64 inputs the leading zero count of the slice is computed by a
// loop; {LP3, LP2, LP1} must equal it (7 for the zero slice) and LP4 must
// flag the zero slice. The rows of the design's truth table are checked
// once more through fixed patterns with don't-care bits randomised.
module tb_lzc_lp6;
  import lzc_pkg::*;

  logic [5:0] x;
  lp_t        lp;
  int         checks = 0, failures = 0;

  lzc_lp6 dut (.x(x), .lp(lp));

  function automatic int clz6(input logic [5:0] a);
    for (int i = 5; i >= 0; i--) if (a[i]) return 5 - i;
    return 7;
  endfunction

  task automatic check(input logic [5:0] a);
    int exp;
    x = a;
    #1;
    exp = clz6(a);
    checks++;
    if ({lp.lp3, lp.lp2, lp.lp1} != 3'(exp) || lp.lp4 != (a == 6'd0)) begin
      failures++;
      $display("FAIL x=%b lp=%b exp count=%0d", a, lp, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) check(6'(i));
    // truth-table rows: the leading one at X6..X1, the rest random
    for (int r = 0; r < 7; r++)
      for (int k = 0; k < 8; k++) begin
        logic [5:0] a;
        a = 6'($urandom);
        if (r < 6) begin
          a = a & (6'h3F >> (r + 1));
          a[5 - r] = 1'b1;
        end else a = '0;
        check(a);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
