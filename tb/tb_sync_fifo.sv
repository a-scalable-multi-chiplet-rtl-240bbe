// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags and the count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [63:0] in_data = '0, out_data;
  logic [4:0] count;
  logic [63:0] q [$];
  int checks = 0, failures = 0, n_full = 0;
  sync_fifo #(.WIDTH(64), .DEPTH(16)) dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int ph;
      ph = (i / 300) % 2;
      in_valid = ($urandom_range(0, 9) < (ph ? 8 : 3));
      out_ready = ($urandom_range(0, 9) < (ph ? 3 : 8));
      in_data = {$urandom(), $urandom()};
      #1;
      checks++;
      if (in_ready !== (q.size() < 16) || out_valid !== (q.size() > 0) || count != 5'(q.size())) begin
        failures++; $display("flags at %0d: size %0d count %0d", i, q.size(), count);
      end
      if (q.size() == 16) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("data at %0d", i); end
      end
      begin
        bit pop, push;
        pop = out_valid && out_ready;
        push = in_valid && in_ready;
        @(posedge clk);
        if (pop) void'(q.pop_front());
        if (push) q.push_back(in_data);
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
