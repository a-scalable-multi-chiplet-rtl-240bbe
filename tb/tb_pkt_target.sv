// tb_pkt_target: sends WRITE and READ packets to the packet endpoint in
// front of a memory model (one-cycle read latency), with random gaps on the
// input and random back-pressure on the output; checks the memory contents,
// the response heads and the returned data.
module tb_pkt_target;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [63:0] in_data = '0, out_data;
  logic mem_req, mem_we, mem_rvalid = 0;
  logic [19:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata = '0;
  logic [63:0] mem [1024];
  logic [63:0] ref_m [1024];
  int checks = 0, failures = 0;

  pkt_target dut (.*);

  always @(posedge clk) begin
    mem_rvalid <= mem_req && !mem_we;
    if (mem_req && mem_we) mem[mem_addr[9:0]] <= mem_wdata;
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr[9:0]];
  end

  logic [63:0] txq [$];
  always @(negedge clk) begin
    in_valid  = (txq.size() > 0) && ($urandom_range(0, 3) != 0);
    in_data   = (txq.size() > 0) ? txq[0] : '0;
    out_ready = ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (in_valid && in_ready) void'(txq.pop_front());

  logic [63:0] rxq [$];
  always @(posedge clk) if (out_valid && out_ready) rxq.push_back(out_data);

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    for (int i = 0; i < 1024; i++) ref_m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 10; p++) begin
      int a, n;
      a = $urandom_range(0, 900); n = $urandom_range(1, 40);
      txq.push_back(64'({PK_WRITE, 4'd3, 12'(n), 12'h0, 32'(a)}));
      for (int i = 0; i < n; i++) begin ref_m[a+i] = {$urandom(), $urandom()}; txq.push_back(ref_m[a+i]); end
    end
    for (int p = 0; p < 10; p++) begin
      int a, n;
      head_t h;
      a = $urandom_range(0, 900); n = $urandom_range(1, 40);
      txq.push_back(64'({PK_READ, 4'd3, 12'(n), 12'(p), 32'(a)}));
      while (rxq.size() < n + 1) @(posedge clk);
      h = head_t'(rxq.pop_front());
      checks++;
      if (h.kind != PK_RESP || h.len != 12'(n) || h.addr != 32'(a) || h.tag != 12'(p)) begin
        failures++; $display("bad response head %h", h);
      end
      for (int i = 0; i < n; i++) begin
        logic [63:0] d;
        d = rxq.pop_front();
        checks++;
        if (d !== ref_m[a+i]) begin failures++; $display("read %0d got %h exp %h", a+i, d, ref_m[a+i]); end
      end
    end
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
