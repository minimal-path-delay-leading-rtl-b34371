// tb_lzc: the generic LZC-N at the widths the design discusses: 64 (the
// default), 32, 16, 8, the floating-point sizes 26, 55 and 68, and 2, 12,
// 40 and 128 for odd slice counts and partial slices. For each width every
// leading-one position is driven with random bits below it, plus the zero
// word and random words; results are compared with a loop count.
module tb_lzc;
  localparam int NK = 11;
  localparam int NS [NK] = '{64, 32, 16, 8, 26, 55, 68, 2, 12, 40, 128};

  logic [127:0] x;
  logic         v [NK];
  logic [6:0]   c [NK];
  int           checks = 0, failures = 0;

  for (genvar k = 0; k < NK; k++) begin : g_dut
    localparam int N = NS[k];
    logic [$clog2(N)-1:0] cn;
    lzc #(.N(N)) dut (.x(x[127 -: N]), .v(v[k]), .c(cn));
    assign c[k] = 7'(cn);
  end

  function automatic int clz(input logic [127:0] a, input int n);
    for (int i = 127; i >= 128 - n; i--) if (a[i]) return 127 - i;
    return (1 << $clog2(n)) - 1;
  endfunction

  task automatic check_all();
    #1;
    for (int k = 0; k < NK; k++) begin
      logic [127:0] m;
      m = ~(128'(0)) << (128 - NS[k]);
      checks++;
      if (c[k] != 7'(clz(x, NS[k])) || v[k] != ((x & m) == 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d x=%h v=%b c=%0d exp=%0d", NS[k], x, v[k], c[k], clz(x, NS[k]));
      end
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    check_all();
    for (int p = 0; p < 128; p++)
      for (int r = 0; r < 8; r++) begin
        x = rnd128() & (~(128'(0)) >> (128 - p));  // random bits below p
        x[p] = 1'b1;
        check_all();
      end
    for (int r = 0; r < 2000; r++) begin
      x = rnd128() >> ($urandom % 128);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
