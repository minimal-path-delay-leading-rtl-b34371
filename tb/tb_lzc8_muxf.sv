// tb_lzc8_muxf: exhaustive test of the multiplexer-based LZC-8 against a
// loop count of leading zeros (all 256 inputs; all ones and v = 1 for 0).
module tb_lzc8_muxf;
  logic [7:0] x;
  logic       v;
  logic [2:0] c;
  int         checks = 0, failures = 0;

  lzc8_muxf dut (.x(x), .v(v), .c(c));

  function automatic int clz8(input logic [7:0] a);
    for (int i = 7; i >= 0; i--) if (a[i]) return 7 - i;
    return 7;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (c != 3'(clz8(x)) || v != (x == 8'd0)) begin
        failures++;
        $display("FAIL x=%b v=%b c=%0d exp=%0d", x, v, c, clz8(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
