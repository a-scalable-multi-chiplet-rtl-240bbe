// flex_pe: one Flexible Tensor PE (L1 buffer, MAC array, post-processing).
//
// The L1 buffer is filled through l1_we/l1_waddr/l1_wdata. A compute step
// is issued with step_issue and l1_raddr in the same cycle that the
// weight-buffer read for the step is issued; one cycle later the L1 word and
// the weight row arrive together and enter the MAC array. The array's
// accumulators therefore hold a step three cycles after it was issued.
// out_bits is the post-processed result of the current accumulators
// (combinational from the accumulator registers).
module flex_pe
  import accel_pkg::*;
#(
  parameter int unsigned L1D = L1_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  prec_e                     mode,
  input  logic [4:0]                shift,
  input  logic                      relu,
  input  logic                      l1_we,
  input  logic [$clog2(L1D)-1:0]    l1_waddr,
  input  logic [WORD_W-1:0]         l1_wdata,
  input  logic                      step_issue,
  input  logic                      step_first,
  input  logic [$clog2(L1D)-1:0]    l1_raddr,
  input  logic [WROW_W-1:0]         wgt,
  output logic [COLS*16-1:0]        out_bits,
  output logic [2:0]                n_words
);
  logic [WORD_W-1:0] act;
  logic              v_d, first_d;

  l1_buffer #(.DEPTH(L1D), .WIDTH(WORD_W)) u_l1 (
    .clk, .we(l1_we), .waddr(l1_waddr), .wdata(l1_wdata),
    .re(step_issue), .raddr(l1_raddr), .rdata(act)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d     <= 1'b0;
      first_d <= 1'b0;
    end else begin
      v_d     <= step_issue;
      first_d <= step_first;
    end
  end

  logic signed [ACC_W-1:0] acc_a [COLS];
  logic signed [ACC_W-1:0] acc_b [COLS];

  mac_array u_arr (
    .clk, .rst_n, .mode,
    .step_valid(v_d), .step_first(first_d),
    .wgt(wgt), .act(act),
    .acc_a, .acc_b
  );

  post_proc u_pp (
    .mode, .shift, .relu, .acc_a, .acc_b, .out_bits, .n_words
  );
endmodule
