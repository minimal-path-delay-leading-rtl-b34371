// tb_lzc_top: end-to-end test of the registered counters at their default
// sizes (LZC-64 and the multiplexer LZC-8).
//
// A stream of words is pushed through with random idle cycles. Each word
// puts its leading one at a chosen position (every position 0..63 and the
// zero word are covered several times) with random bits below. A scoreboard
// expects every result exactly two clock edges after its word was taken,
// with the count from a loop-based reference. The LZC-8 side gets all 256
// values the same way. The test also counts how often each mechanism of the
// counter was exercised and fails if one never was:
//   all-zero word (v = 1)           leading one in each 16-bit slice
//   inside a slice: leading one in  X16..X11, in X10..X9, in X8..X6, in X5..X1
//   tree levels 1 and 2 taking the low half (high half all zero)
//   idle cycles (in_valid low)      every count value 0..63
module tb_lzc_top;
  localparam int N  = 64;
  localparam int CW = 6;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid, out_valid;
  logic [N-1:0]  x;
  logic          v;
  logic [CW-1:0] c;
  logic          in_valid8, out_valid8;
  logic [7:0]    x8;
  logic          v8;
  logic [2:0]    c8;

  int checks = 0, failures = 0;
  int cycle = 0;

  lzc_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x(x), .out_valid(out_valid), .v(v), .c(c),
    .in_valid8(in_valid8), .x8(x8), .out_valid8(out_valid8), .v8(v8), .c8(c8)
  );

  always #5 clk = ~clk;

  typedef struct {
    int   due;
    logic v;
    int   c;
  } exp_t;

  exp_t q64[$];
  exp_t q8[$];

  // mechanism counters
  int n_zero = 0, n_idle = 0, n_lvl1_low = 0, n_lvl2_low = 0;
  int n_slice [4] = '{default: 0};
  int n_part [4] = '{default: 0};
  int n_count [N] = '{default: 0};

  function automatic int clz(input logic [63:0] a, input int n);
    for (int i = n - 1; i >= 0; i--) if (a[i]) return n - 1 - i;
    return (1 << $clog2(n)) - 1;
  endfunction

  function automatic logic [63:0] word_with_lead(input int p);
    logic [63:0] w;
    w = {$urandom, $urandom};
    if (p < 0) return '0;
    w = w & (64'hFFFF_FFFF_FFFF_FFFF >> (64 - p));
    w[p] = 1'b1;
    return w;
  endfunction

  task automatic note(input logic [63:0] w);
    int cnt;
    cnt = clz(w, N);
    if (w == 0) begin
      n_zero++;
      return;
    end
    n_count[cnt]++;
    n_slice[cnt / 16]++;
    case (cnt % 16) inside
      [0:5]:   n_part[0]++;
      [6:7]:   n_part[1]++;
      [8:10]:  n_part[2]++;
      default: n_part[3]++;
    endcase
    if (w[63:48] == 0) n_lvl1_low++;   // level-1 node 0 selects its low half
    if (w[63:32] == 0) n_lvl2_low++;   // root selects its low half
  endtask

  // scoreboard, checked on every rising edge after the registers update
  always @(posedge clk) begin
    #1;
    cycle++;
    if (rst_n) begin
      if (q64.size() > 0 && q64[0].due == cycle) begin
        exp_t e;
        e = q64.pop_front();
        checks++;
        if (!out_valid || v != e.v || c != CW'(e.c)) begin
          failures++;
          if (failures < 10)
            $display("FAIL 64 cycle %0d: valid=%b v=%b c=%0d exp v=%b c=%0d",
                     cycle, out_valid, v, c, e.v, e.c);
        end
      end else if (out_valid) begin
        failures++;
        $display("FAIL 64 cycle %0d: unexpected out_valid", cycle);
      end
      if (q8.size() > 0 && q8[0].due == cycle) begin
        exp_t e;
        e = q8.pop_front();
        checks++;
        if (!out_valid8 || v8 != e.v || c8 != 3'(e.c)) begin
          failures++;
          if (failures < 10)
            $display("FAIL 8 cycle %0d: valid=%b v=%b c=%0d exp v=%b c=%0d",
                     cycle, out_valid8, v8, c8, e.v, e.c);
        end
      end else if (out_valid8) begin
        failures++;
        $display("FAIL 8 cycle %0d: unexpected out_valid8", cycle);
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_valid8 = 1'b0;
    x = '0;
    x8 = '0;
    repeat (3) @(posedge clk);
    #2;
    rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      for (int p = -1; p < N; p++) begin
        logic [63:0] w;
        w = word_with_lead(p);
        x = w;
        in_valid = 1'b1;
        x8 = 8'((r * 65 + p + 1) % 256);
        in_valid8 = (r < 4) || ($urandom % 2 == 0);
        note(w);
        @(posedge clk);
        // the word is captured at this edge; the result is due one edge later
        q64.push_back('{due: cycle + 2, v: (w == 0), c: clz(w, N)});
        if (in_valid8)
          q8.push_back('{due: cycle + 2, v: (x8 == 0), c: clz(64'(x8), 8)});
        #2;
        if ($urandom % 8 == 0) begin
          in_valid = 1'b0;
          in_valid8 = 1'b0;
          x = word_with_lead($urandom % N);
          n_idle++;
          @(posedge clk);
          #2;
        end
      end
    end
    in_valid = 1'b0;
    in_valid8 = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    if (q64.size() != 0 || q8.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d / %0d", q64.size(), q8.size());
    end
    // every mechanism must have been exercised
    begin
      int missing;
      missing = 0;
      if (n_zero == 0) missing++;
      if (n_idle == 0) missing++;
      if (n_lvl1_low == 0) missing++;
      if (n_lvl2_low == 0) missing++;
      for (int i = 0; i < 4; i++) begin
        if (n_slice[i] == 0) missing++;
        if (n_part[i] == 0) missing++;
      end
      for (int i = 0; i < N; i++) if (n_count[i] == 0) missing++;
      checks++;
      if (missing != 0) begin
        failures += missing;
        $display("FAIL %0d mechanisms never exercised", missing);
      end
      $display("coverage: zero=%0d idle=%0d lvl1_low=%0d lvl2_low=%0d slices=%0d/%0d/%0d/%0d parts=%0d/%0d/%0d/%0d",
               n_zero, n_idle, n_lvl1_low, n_lvl2_low, n_slice[0], n_slice[1], n_slice[2],
               n_slice[3], n_part[0], n_part[1], n_part[2], n_part[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
