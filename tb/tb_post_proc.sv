// tb_post_proc: checks requantisation (rounding shift, ReLU, saturation) and
// packing of the post-processing stage in all three precision modes.
module tb_post_proc;
  import accel_pkg::*;
  prec_e mode;
  logic [4:0] shift;
  logic relu;
  logic signed [ACC_W-1:0] acc_a [COLS];
  logic signed [ACC_W-1:0] acc_b [COLS];
  logic [COLS*16-1:0] out_bits;
  logic [2:0] n_words;
  int checks = 0, failures = 0;

  post_proc dut (.*);

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
    for (int it = 0; it < 300; it++) begin
      logic [255:0] e;
      mode = prec_e'(it % 3);
      shift = 5'($urandom_range(0, 20));
      relu = 1'($urandom());
      for (int c = 0; c < COLS; c++) begin
        acc_a[c] = (it % 5 == 0) ? 32'($signed($urandom())) : 32'($signed(32'($urandom_range(0, 200000)) - 100000));
        acc_b[c] = 32'($signed(32'($urandom_range(0, 4000)) - 2000));
      end
      #1;
      e = '0;
      for (int c = 0; c < COLS; c++)
        case (mode)
          PREC_A8W8: e[c*8 +: 8] = 8'(rq(acc_a[c], shift, relu, 8));
          PREC_A8W4: begin
            e[2*c*8 +: 8] = 8'(rq(acc_a[c], shift, relu, 8));
            e[(2*c+1)*8 +: 8] = 8'(rq(acc_b[c], shift, relu, 8));
          end
          default: e[c*16 +: 16] = 16'(rq(acc_a[c], shift, relu, 16));
        endcase
      checks++;
      if (out_bits !== e || n_words != ((mode == PREC_A8W8) ? 3'd2 : 3'd4)) begin
        failures++;
        $display("mode %0d shift %0d relu %0d: got %h exp %h", mode, shift, relu, out_bits, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
