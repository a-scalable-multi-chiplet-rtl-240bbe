// tb_flex_pe: fills one PE's L1 buffer, runs k-step accumulations with
// weight rows presented one cycle after each step is issued (as the weight
// buffer delivers them) and checks the post-processed results, three
// cycles after the last step, in every precision mode.
module tb_flex_pe;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  prec_e mode = PREC_A8W8;
  logic [4:0] shift = '0;
  logic relu = 0;
  logic l1_we = 0;
  logic [9:0] l1_waddr = '0, l1_raddr = '0;
  logic [63:0] l1_wdata = '0;
  logic step_issue = 0, step_first = 0;
  logic [WROW_W-1:0] wgt = '0;
  logic [COLS*16-1:0] out_bits;
  logic [2:0] n_words;
  int checks = 0, failures = 0;
  logic [63:0] l1m [16];
  logic [WROW_W-1:0] wr [16];

  flex_pe dut (.*);

  function automatic int sx(logic [15:0] v, int bits);
    int r;
    r = int'(v) & ((1 << bits) - 1);
    if (r >= (1 << (bits - 1))) r -= (1 << bits);
    return r;
  endfunction
  function automatic longint rq(longint x, int sh, bit rl, int bits);
    longint r, hi, lo;
    r = (sh == 0) ? x : ((x + (longint'(1) << (sh - 1))) >>> sh);
    if (rl && r < 0) r = 0;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      l1m[i] = {$urandom(), $urandom()};
      @(negedge clk); l1_we = 1; l1_waddr = 10'(40 + i); l1_wdata = l1m[i];
    end
    @(negedge clk); l1_we = 0;
    for (int it = 0; it < 9; it++) begin
      int k;
      longint aa [COLS], ab [COLS];
      logic [255:0] e;
      k = 1 + (it % 5);
      mode = prec_e'(it % 3); shift = 5'($urandom_range(0, 8)); relu = 1'($urandom());
      for (int i = 0; i < k; i++) for (int j = 0; j < WROW_W / 32; j++) wr[i][j*32 +: 32] = $urandom();
      for (int c = 0; c < COLS; c++) begin aa[c] = 0; ab[c] = 0; end
      for (int i = 0; i <= k; i++) begin
        step_issue = (i < k); step_first = (i == 0); l1_raddr = 10'(40 + i);
        wgt = (i > 0) ? wr[i-1] : '0;
        @(negedge clk);
      end
      step_issue = 0; wgt = '0;
      @(negedge clk);
      for (int i = 0; i < k; i++)
        for (int c = 0; c < COLS; c++) for (int q = 0; q < PAIRS; q++) begin
          logic [15:0] a, w;
          a = l1m[i][q*16 +: 16]; w = wr[i][(c*PAIRS+q)*16 +: 16];
          case (mode)
            PREC_A8W8: aa[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:0]),8) + sx(16'(a[15:8]),8)*sx(16'(w[15:8]),8);
            PREC_A8W4: begin
              aa[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:4]),4) + sx(16'(a[15:8]),8)*sx(16'(w[15:12]),4);
              ab[c] += sx(16'(a[7:0]),8)*sx(16'(w[3:0]),4) + sx(16'(a[15:8]),8)*sx(16'(w[11:8]),4);
            end
            default: aa[c] += longint'(sx(a,16)) * sx(16'(w[7:0]),8);
          endcase
        end
      e = '0;
      for (int c = 0; c < COLS; c++)
        case (mode)
          PREC_A8W8: e[c*8 +: 8] = 8'(rq(aa[c], shift, relu, 8));
          PREC_A8W4: begin e[2*c*8 +: 8] = 8'(rq(aa[c], shift, relu, 8)); e[(2*c+1)*8 +: 8] = 8'(rq(ab[c], shift, relu, 8)); end
          default: e[c*16 +: 16] = 16'(rq(aa[c], shift, relu, 16));
        endcase
      checks++;
      if (out_bits !== e) begin failures++; $display("it %0d mode %0d k %0d: got %h exp %h", it, mode, k, out_bits, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
