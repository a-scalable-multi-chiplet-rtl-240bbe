// tb_l1_buffer: writes random words to the L1 buffer, reads them back and
// checks the data and the one-cycle read latency.
module tb_l1_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] ref_m [1024];
  int checks = 0, failures = 0;
  l1_buffer dut (.*);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); ref_m[i] = {$urandom(), $urandom()}; wdata = ref_m[i];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk); re = 1; raddr = 10'(a);
      @(negedge clk); re = 0; raddr = 10'(a ^ 1);
      checks++;
      if (rdata !== ref_m[a]) begin failures++; $display("addr %0d got %h exp %h", a, rdata, ref_m[a]); end
    end
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
