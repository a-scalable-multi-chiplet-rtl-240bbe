// tb_llc_buffer: exercises both LLC ports: writes through one port are read
// through the other, simultaneous accesses, and the one-cycle read latency.
module tb_llc_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [14:0] a_addr = '0, b_addr = '0;
  logic [63:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [63:0] ref_m [int];
  int checks = 0, failures = 0;
  llc_buffer dut (.*);
  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 15'(i * 80); a_wdata = {$urandom(), $urandom()}; ref_m[i*80] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 15'(i * 80 + 1); b_wdata = {$urandom(), $urandom()}; ref_m[i*80+1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < 400; i++) begin
      a_addr = 15'(i * 80 + 1); b_addr = 15'(i * 80);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== ref_m[i*80+1]) begin failures++; $display("A %0d", i); end
      if (b_rdata !== ref_m[i*80])   begin failures++; $display("B %0d", i); end
    end
    // same word written by both ports: port B wins
    a_we = 1; b_we = 1; a_addr = 15'd7; b_addr = 15'd7; a_wdata = 64'h1; b_wdata = 64'h2;
    @(negedge clk); a_we = 0; b_we = 0;
    @(negedge clk);
    checks++;
    if (a_rdata !== 64'h2) begin failures++; $display("collision %h", a_rdata); end
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
