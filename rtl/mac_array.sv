// mac_array: the 8x16 MAC array of one Flexible Tensor PE.
//
// COLS columns of PAIRS MAC pairs (two MAC rows per pair). Each column owns
// one output channel (two in PREC_A8W4 mode): the weights of column c enter
// from the weight buffer and are held in the column's weight registers,
// while one activation vector (PAIRS x 16 bits, one 16-bit slot per pair)
// from the L1 buffer is held in the activation vector register and shared
// by all columns. Each column adds its PAIRS pair sums into its
// accumulators (acc_a, acc_b).
//
// Timing: a step presented with step_valid in cycle t is captured by the
// weight/activation registers at the end of t and accumulated at the end of
// t+1, so acc reflects a step two cycles after it was presented. The weight
// register is reloaded every step while the previous step accumulates,
// overlapping weight loading with computation. step_first clears the
// accumulators instead of adding to them. The activation vector is
// broadcast to all columns in one cycle rather than skewed column by column;
// that, the accumulator width and the slot layout are this implementation's
// choices.
//
// wgt layout: column c, pair p -> wgt[(c*PAIRS+p)*16 +: 16]
// act layout: pair p           -> act[p*16 +: 16]
module mac_array
  import accel_pkg::*;
#(
  parameter int unsigned NCOL  = COLS,
  parameter int unsigned NPAIR = PAIRS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  prec_e                         mode,
  input  logic                          step_valid,
  input  logic                          step_first,
  input  logic [NCOL*NPAIR*16-1:0]      wgt,
  input  logic [NPAIR*16-1:0]           act,
  output logic signed [ACC_W-1:0]       acc_a [NCOL],
  output logic signed [ACC_W-1:0]       acc_b [NCOL]
);
  logic [NCOL*NPAIR*16-1:0] wgt_r;
  logic [NPAIR*16-1:0]      act_r;
  logic                     v_r, first_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r     <= 1'b0;
      first_r <= 1'b0;
      wgt_r   <= '0;
      act_r   <= '0;
    end else begin
      v_r     <= step_valid;
      first_r <= step_first;
      if (step_valid) begin
        wgt_r <= wgt;
        act_r <= act;
      end
    end
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic signed [PSUM_W-1:0] pa [NPAIR];
    logic signed [PSUM_W-1:0] pb [NPAIR];
    for (genvar p = 0; p < NPAIR; p++) begin : g_pair
      mac_pair u_pair (
        .mode   (mode),
        .act    (act_r[p*16 +: 16]),
        .wgt    (wgt_r[(c*NPAIR+p)*16 +: 16]),
        .psum_a (pa[p]),
        .psum_b (pb[p])
      );
    end
    logic signed [ACC_W-1:0] sa, sb;
    always_comb begin
      sa = '0;
      sb = '0;
      for (int p = 0; p < NPAIR; p++) begin
        sa += ACC_W'(pa[p]);
        sb += ACC_W'(pb[p]);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc_a[c] <= '0;
        acc_b[c] <= '0;
      end else if (v_r) begin
        acc_a[c] <= (first_r ? '0 : acc_a[c]) + sa;
        acc_b[c] <= (first_r ? '0 : acc_b[c]) + sb;
      end
    end
  end
endmodule
