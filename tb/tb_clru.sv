// tb_clru: checks the chiplet router unit. HUB requests that cross 4 KB
// pages must leave on the link side as one packet per page with the right
// addresses, lengths and data; packets arriving from the link must be
// sorted by the data parser into responses (to the HUB) and remote requests;
// the APB counters must match and clearing the enable bit must hold back
// HUB requests.
module tb_clru;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [3:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic hub_in_valid = 0, hub_in_ready, hub_out_valid, hub_out_ready = 1;
  logic [63:0] hub_in_data = '0, hub_out_data;
  logic rreq_valid, rreq_ready = 1;
  logic [63:0] rreq_data;
  logic d2d_out_valid, d2d_out_ready = 1, d2d_in_valid = 0, d2d_in_ready;
  logic [63:0] d2d_out_data, d2d_in_data = '0;
  int checks = 0, failures = 0;

  clru dut (.*);

  logic [63:0] hq [$], lq [$];        // to drive: HUB side, link side
  logic [63:0] outq [$], respq [$], rreqq [$];
  always @(negedge clk) begin
    hub_in_valid = rst_n && hq.size() > 0;  hub_in_data = (hq.size() > 0) ? hq[0] : '0;
    d2d_in_valid = rst_n && lq.size() > 0;  d2d_in_data = (lq.size() > 0) ? lq[0] : '0;
    d2d_out_ready = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (hub_in_valid && hub_in_ready) void'(hq.pop_front());
    if (d2d_in_valid && d2d_in_ready) void'(lq.pop_front());
    if (d2d_out_valid && d2d_out_ready) outq.push_back(d2d_out_data);
    if (hub_out_valid && hub_out_ready) respq.push_back(hub_out_data);
    if (rreq_valid && rreq_ready) rreqq.push_back(rreq_data);
  end

  task automatic apb(input bit wr, input int a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk); psel = 1; pwrite = wr; paddr = 4'(a * 4); pwdata = wd; penable = 0;
    @(negedge clk); penable = 1;
    @(posedge clk); rd = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] r;
    int exp_pk = 0, exp_split = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // writes and reads with random start and length
    for (int n = 0; n < 12; n++) begin
      int a, len, done;
      logic [63:0] data [$];
      bit wr;
      wr = (n % 2 == 0);
      a = $urandom_range(0, 3000); len = $urandom_range(1, 1200);
      hq.push_back(64'({wr ? PK_WRITE : PK_READ, 4'd5, 12'(len), 12'h0, 32'(a)}));
      data = {};
      if (wr) for (int i = 0; i < len; i++) begin data.push_back({$urandom(), $urandom()}); hq.push_back(data[i]); end
      done = 0;
      while (done < len) begin
        head_t h;
        int chunk;
        chunk = 512 - ((a + done) % 512);
        if (chunk > len - done) chunk = len - done;
        while (outq.size() == 0) @(posedge clk);
        h = head_t'(outq.pop_front());
        exp_pk++;
        if (done != 0) exp_split++;
        checks++;
        if (h.addr != 32'(a + done) || int'(h.len) != chunk || h.kind != (wr ? PK_WRITE : PK_READ) || h.target != 4'd5) begin
          failures++; $display("request %0d: head %h, expected addr %0d len %0d", n, h, a + done, chunk);
        end
        if (wr) for (int i = 0; i < chunk; i++) begin
          while (outq.size() == 0) @(posedge clk);
          checks++;
          if (outq.pop_front() !== data[done + i]) begin failures++; $display("request %0d data %0d", n, done + i); end
        end
        done += chunk;
      end
    end
    // packets from the link: responses and remote requests interleaved
    for (int n = 0; n < 8; n++) begin
      pkind_e k;
      int len;
      k = pkind_e'(n % 3);
      len = $urandom_range(1, 20);
      lq.push_back(64'({k, 4'd0, 12'(len), 12'(n), 32'(n * 100)}));
      if (k != PK_READ) for (int i = 0; i < len; i++) lq.push_back(64'(n * 1000 + i));
      while (lq.size() != 0) @(posedge clk);
      repeat (4) @(posedge clk);
      begin
        logic [63:0] q [$];
        head_t qh;
        q = (k == PK_RESP) ? respq : rreqq;
        qh = (q.size() > 0) ? head_t'(q[0]) : '0;
        checks++;
        if (q.size() != ((k == PK_READ) ? 1 : len + 1) || qh.tag != 12'(n)) begin
          failures++; $display("link packet %0d kind %0d went wrong way (%0d/%0d)", n, k, respq.size(), rreqq.size());
        end
        for (int i = 1; i < q.size(); i++) begin
          checks++;
          if (q[i] !== 64'(n * 1000 + i - 1)) begin failures++; $display("link packet %0d data", n); end
        end
        respq = {}; rreqq = {};
      end
    end
    apb(0, 1, 0, r); checks++; if (int'(r) != exp_pk) begin failures++; $display("sent %0d exp %0d", r, exp_pk); end
    apb(0, 2, 0, r); checks++; if (r != 32'd8) begin failures++; $display("recv %0d", r); end
    apb(0, 3, 0, r); checks++; if (int'(r) != exp_split || exp_split == 0) begin failures++; $display("split %0d exp %0d", r, exp_split); end
    // disable: a request must wait until re-enabled
    apb(1, 0, 0, r);
    hq.push_back(64'({PK_READ, 4'd5, 12'd1, 12'h0, 32'd8}));
    repeat (20) @(posedge clk);
    checks++; if (outq.size() != 0) begin failures++; $display("request passed while disabled"); end
    apb(1, 0, 1, r);
    repeat (10) @(posedge clk);
    checks++; if (outq.size() != 1) begin failures++; $display("request lost after enable"); end
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
