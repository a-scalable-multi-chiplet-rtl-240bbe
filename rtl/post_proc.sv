// post_proc: post-processing of one PE's accumulators.
//
// Orders the accumulators as output channels (channel c = acc_a[c]; in
// PREC_A8W4 mode channel 2c = acc_a[c] and 2c+1 = acc_b[c]), then for each
// channel: arithmetic right shift by `shift` with round-half-up, optional
// ReLU, and saturation to the activation width of the mode (int8, or int16
// in PREC_A16W8). Results are packed little-endian into 64-bit words, the
// layout the MAC array reads activations in, so results can feed the next
// layer: n_words is 2 (A8W8: 16 x int8), 4 (A8W4: 32 x int8) or
// 4 (A16W8: 16 x int16). The design only names this stage; the operations
// are this implementation's choice. Purely combinational.
module post_proc
  import accel_pkg::*;
#(
  parameter int unsigned NCOL = COLS
) (
  input  prec_e                    mode,
  input  logic [4:0]               shift,
  input  logic                     relu,
  input  logic signed [ACC_W-1:0]  acc_a [NCOL],
  input  logic signed [ACC_W-1:0]  acc_b [NCOL],
  output logic [NCOL*16-1:0]       out_bits,
  output logic [2:0]               n_words
);
  function automatic logic signed [ACC_W-1:0] requant(logic signed [ACC_W-1:0] x,
                                                      logic [4:0] sh, logic rl,
                                                      int unsigned bits);
    logic signed [ACC_W:0] r;
    logic signed [ACC_W:0] hi, lo;
    r = (sh == 0) ? (ACC_W+1)'(x) : (((ACC_W+1)'(x) + ((ACC_W+1)'(1) <<< (sh - 1))) >>> sh);
    if (rl && r < 0) r = '0;
    hi = ((ACC_W+1)'(1) <<< (bits - 1)) - 1;
    lo = -((ACC_W+1)'(1) <<< (bits - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return ACC_W'(r);
  endfunction

  always_comb begin
    out_bits = '0;
    unique case (mode)
      PREC_A8W4: begin
        n_words = 3'(NCOL * 16 / 64);
        for (int c = 0; c < NCOL; c++) begin
          out_bits[(2*c)*8   +: 8] = 8'(requant(acc_a[c], shift, relu, 8));
          out_bits[(2*c+1)*8 +: 8] = 8'(requant(acc_b[c], shift, relu, 8));
        end
      end
      PREC_A16W8: begin
        n_words = 3'(NCOL * 16 / 64);
        for (int c = 0; c < NCOL; c++)
          out_bits[c*16 +: 16] = 16'(requant(acc_a[c], shift, relu, 16));
      end
      default: begin
        n_words = 3'(NCOL * 8 / 64);
        for (int c = 0; c < NCOL; c++)
          out_bits[c*8 +: 8] = 8'(requant(acc_a[c], shift, relu, 8));
      end
    endcase
  end
endmodule
