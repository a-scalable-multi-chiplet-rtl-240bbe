// tb_flex_interconnect: checks the registered LLC-to-L1 multicast (write
// enables follow the mask one cycle later) and the result gather path.
module tb_flex_interconnect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sc_valid = 0;
  logic [7:0] sc_mask = '0;
  logic [9:0] sc_addr = '0;
  logic [63:0] sc_data = '0;
  logic [7:0] l1_we;
  logic [9:0] l1_waddr;
  logic [63:0] l1_wdata;
  logic [2:0] g_pe = '0;
  logic [1:0] g_word = '0;
  logic [255:0] pe_out [8];
  logic [63:0] g_data;
  int checks = 0, failures = 0;
  flex_interconnect dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic v;
      logic [7:0] m;
      logic [9:0] a;
      logic [63:0] d;
      v = 1'($urandom()); m = 8'($urandom()); a = 10'($urandom()); d = {$urandom(), $urandom()};
      sc_valid = v; sc_mask = m; sc_addr = a; sc_data = d;
      @(negedge clk);
      sc_valid = 0;
      checks++;
      if (l1_we !== (v ? m : 8'h0) || (v && (l1_waddr !== a || l1_wdata !== d))) begin
        failures++; $display("scatter %0d: we %h", i, l1_we);
      end
    end
    for (int p = 0; p < 8; p++) for (int w = 0; w < 8; w++) pe_out[p][w*32 +: 32] = $urandom();
    for (int p = 0; p < 8; p++) for (int w = 0; w < 4; w++) begin
      g_pe = 3'(p); g_word = 2'(w);
      #1;
      checks++;
      if (g_data !== pe_out[p][w*64 +: 64]) begin failures++; $display("gather %0d %0d", p, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
