// tb_hub_router: sends write and read packets for all ten targets through
// the router and checks that each arrives whole at its target only; then
// makes several targets answer at once and checks that the merged stream
// carries each response packet whole, that the arbitration is round robin
// (with two packets waiting at every target, the first ten packets come
// from ten different targets) and that conflicts were seen.
module tb_hub_router;
  import accel_pkg::*;
  localparam int NT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_in_valid = 0, host_in_ready, host_out_valid, host_out_ready = 1;
  logic [63:0] host_in_data = '0, host_out_data;
  logic [NT-1:0] req_valid, req_ready = '1, rsp_valid, rsp_ready;
  logic [63:0] req_data;
  logic [63:0] rsp_data [NT];
  logic conflict;
  int checks = 0, failures = 0, n_conf = 0;

  hub_router #(.NT(NT)) dut (.*);

  logic [63:0] hq [$];
  logic [63:0] got [NT][$];
  logic [63:0] rq [NT][$];
  logic [63:0] outq [$];
  always @(negedge clk) begin
    host_in_valid = rst_n && hq.size() > 0; host_in_data = (hq.size() > 0) ? hq[0] : '0;
    req_ready = NT'($urandom());
    host_out_ready = ($urandom_range(0, 2) != 0);
  end
  always_comb for (int t = 0; t < NT; t++) begin
    rsp_valid[t] = rst_n && rq[t].size() > 0;
    rsp_data[t]  = (rq[t].size() > 0) ? rq[t][0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (host_in_valid && host_in_ready) void'(hq.pop_front());
    for (int t = 0; t < NT; t++) begin
      if (req_valid[t] && req_ready[t]) got[t].push_back(req_data);
      if (rsp_valid[t] && rsp_ready[t]) void'(rq[t].pop_front());
    end
    if (host_out_valid && host_out_ready) outq.push_back(host_out_data);
    if (conflict) n_conf++;
  end

  initial begin
    logic [63:0] expq [NT][$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int t, len;
      bit wr;
      t = $urandom_range(0, NT - 1); len = $urandom_range(1, 8); wr = 1'($urandom());
      hq.push_back(64'({wr ? PK_WRITE : PK_READ, 4'(t), 12'(len), 12'(n), 32'(n)}));
      expq[t].push_back(hq[$]);
      if (wr) for (int i = 0; i < len; i++) begin hq.push_back({$urandom(), $urandom()}); expq[t].push_back(hq[$]); end
    end
    while (hq.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (got[t] != expq[t]) begin failures++; $display("target %0d received %0d flits, expected %0d", t, got[t].size(), expq[t].size()); end
    end
    // responses from all targets at once
    for (int r = 0; r < 2; r++)
      for (int t = 0; t < NT; t++) begin
        int len;
        len = $urandom_range(1, 6);
        rq[t].push_back(64'({PK_RESP, 4'(t), 12'(len), 12'(r), 32'h0}));
        for (int i = 0; i < len; i++) rq[t].push_back(64'(t * 100 + i));
      end
    begin
      int seen [NT];
      int pk;
      bit all_empty;
      do begin @(posedge clk); all_empty = 1; for (int t = 0; t < NT; t++) if (rq[t].size() != 0) all_empty = 0; end
      while (!all_empty);
      repeat (3) @(posedge clk);
      pk = 0;
      while (outq.size() > 0) begin
        head_t h;
        h = head_t'(outq.pop_front());
        pk++;
        seen[h.target]++;
        if (pk <= NT) begin
          checks++;
          if (seen[h.target] != 1) begin failures++; $display("target %0d served twice before others", h.target); end
        end
        for (int i = 0; i < int'(h.len); i++) begin
          checks++;
          if (outq.pop_front() !== 64'(int'(h.target) * 100 + i)) begin failures++; $display("response of %0d interleaved", h.target); end
        end
      end
      checks++;
      if (pk != 2 * NT) begin failures++; $display("%0d response packets", pk); end
    end
    checks++;
    if (n_conf == 0) begin failures++; $display("no conflict seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
