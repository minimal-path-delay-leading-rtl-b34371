// tb_lzc_merge: the merge stage joins two LZC-8 results into an LZC-16
// result. For every pair of bytes (a, b) the halves are fed with their
// reference counts and the output is compared with the reference count of
// the 16-bit word {a, b}; a second instance (W = 4) checks the missing-half
// constants against a 16-bit word padded with a zero low half.
module tb_lzc_merge;
  logic       v_h, v_l, v;
  logic [2:0] c_h, c_l;
  logic [3:0] c;
  logic       v2;
  logic [3:0] c2_h;
  logic [4:0] c2;
  int         checks = 0, failures = 0;

  lzc_merge #(.W(3)) dut (
    .v_h(v_h), .c_h(c_h), .v_l(v_l), .c_l(c_l), .v(v), .c(c)
  );
  lzc_merge #(.W(4)) dut_pad (
    .v_h(v_h), .c_h(c2_h), .v_l(1'b1), .c_l(4'hF), .v(v2), .c(c2)
  );

  function automatic int clz(input logic [31:0] a, input int n);
    for (int i = n - 1; i >= 0; i--) if (a[i]) return n - 1 - i;
    return (1 << $clog2(n)) - 1;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [7:0] a, b;
      a = i[15:8];
      b = i[7:0];
      v_h = (a == 0); c_h = 3'(clz(32'(a), 8));
      v_l = (b == 0); c_l = 3'(clz(32'(b), 8));
      c2_h = 4'(clz(32'({a, b}), 16));
      #1;
      checks++;
      if (v != (i == 0) || c != 4'(clz(32'(i), 16))) begin
        failures++;
        if (failures < 10) $display("FAIL %h v=%b c=%0d", i, v, c);
      end
      if (v_h) begin
        // v_h here is "a == 0"; use the 16-bit word as the high half
        v_h = (i == 0);
        #1;
        checks++;
        if (v2 != (i == 0) || c2 != 5'(clz({16'(i), 16'h0}, 32))) begin
          failures++;
          if (failures < 10) $display("FAIL pad %h v=%b c=%0d", i, v2, c2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
