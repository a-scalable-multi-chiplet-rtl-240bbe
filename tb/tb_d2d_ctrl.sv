// tb_d2d_ctrl: two link controllers wired lane to lane. Random flits are
// sent both ways; the receivers are slowed down at times so that the
// credits run out and the transmitters stall. Checks data and order,
// that no receive FIFO overflows (assertion inside), that stalls happened,
// and the full-rate case of one flit per four cycles (64 bits on 2 x 8-bit
// lanes).
module tb_d2d_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_tx_valid = 0, a_tx_ready, a_rx_valid, a_rx_ready = 1;
  logic b_tx_valid = 0, b_tx_ready, b_rx_valid, b_rx_ready = 1;
  logic [63:0] a_tx_data = '0, a_rx_data, b_tx_data = '0, b_rx_data;
  logic ab_v, ab_f, ba_v, ba_f, ab_c, ba_c, a_st, b_st;
  logic [15:0] ab_d, ba_d;
  int checks = 0, failures = 0, stalls = 0;

  d2d_ctrl u_a (.clk, .rst_n, .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_data(a_tx_data),
                .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_data(a_rx_data),
                .lane_tx_valid(ab_v), .lane_tx_first(ab_f), .lane_tx_data(ab_d),
                .lane_rx_valid(ba_v), .lane_rx_first(ba_f), .lane_rx_data(ba_d),
                .credit_tx(ab_c), .credit_rx(ba_c), .stalled(a_st));
  d2d_ctrl u_b (.clk, .rst_n, .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_data(b_tx_data),
                .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_data(b_rx_data),
                .lane_tx_valid(ba_v), .lane_tx_first(ba_f), .lane_tx_data(ba_d),
                .lane_rx_valid(ab_v), .lane_rx_first(ab_f), .lane_rx_data(ab_d),
                .credit_tx(ba_c), .credit_rx(ab_c), .stalled(b_st));

  logic [63:0] qa [$], qb [$];   // sent by A (expected at B), sent by B
  int sent_a = 0, sent_b = 0, n_tx = 300;
  bit slow = 0;
  always @(posedge clk) if (a_st || b_st) stalls++;

  always @(negedge clk) begin
    if (rst_n) begin
      if (!a_tx_valid && sent_a < n_tx) begin a_tx_valid = 1; a_tx_data = {$urandom(), $urandom()}; end
      if (!b_tx_valid && sent_b < n_tx) begin b_tx_valid = 1; b_tx_data = {$urandom(), $urandom()}; end
      a_rx_ready = slow ? ($urandom_range(0, 9) == 0) : 1'b1;
      b_rx_ready = slow ? ($urandom_range(0, 9) == 0) : 1'b1;
    end
  end
  always @(posedge clk) begin
    if (a_tx_valid && a_tx_ready) begin qa.push_back(a_tx_data); sent_a++; #1 a_tx_valid = 0; end
  end
  always @(posedge clk) begin
    if (b_tx_valid && b_tx_ready) begin qb.push_back(b_tx_data); sent_b++; #1 b_tx_valid = 0; end
  end
  int got_a = 0, got_b = 0;
  always @(posedge clk) begin
    if (rst_n && b_rx_valid && b_rx_ready) begin
      checks++; got_b++;
      if (b_rx_data !== qa[0]) begin failures++; $display("A->B flit %0d got %h exp %h", got_b, b_rx_data, qa[0]); end
      void'(qa.pop_front());
    end
    if (rst_n && a_rx_valid && a_rx_ready) begin
      checks++; got_a++;
      if (a_rx_data !== qb[0]) begin failures++; $display("B->A flit %0d", got_a); end
      void'(qb.pop_front());
    end
  end

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    slow = 1;
    wait (sent_a >= 150 && sent_b >= 150);
    slow = 0;
    wait (got_a == n_tx && got_b == n_tx);
    // full rate: a continuous stream of 40 flits takes 4 cycles each
    n_tx = n_tx + 40;
    @(posedge clk); t0 = $time;
    wait (got_b == n_tx);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 40 * 4 + 8) begin failures++; $display("too slow: %0d cycles", (t1 - t0) / 10); end
    checks++;
    if (stalls == 0) begin failures++; $display("credits never ran out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
