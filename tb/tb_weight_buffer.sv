// tb_weight_buffer: fills every bank with random weights and reads rows in
// the UMA, dual, quad and full NUMA modes, checking that each PE receives
// the row of the right bank, including rows in the upper banks of a merged
// group.
module tb_weight_buffer;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_mode_e mode = WB_UMA;
  logic we = 0, re = 0;
  logic [2:0] wbank = '0;
  logic [6:0] wrow = '0;
  logic [3:0] wsub = '0;
  logic [63:0] wdata = '0;
  logic [9:0] raddr = '0;
  logic [1023:0] rdata [8];
  logic [63:0] ref_m [8][16][128];
  int checks = 0, failures = 0;
  weight_buffer dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 8; b++) for (int s = 0; s < 16; s++) for (int r = 0; r < 128; r++) begin
      @(negedge clk); we = 1; wbank = 3'(b); wsub = 4'(s); wrow = 7'(r);
      ref_m[b][s][r] = {$urandom(), $urandom()}; wdata = ref_m[b][s][r];
    end
    @(negedge clk); we = 0;
    for (int m = 0; m < 4; m++) begin
      int g;
      g = 1 << m;
      repeat (60) begin
        int a;
        a = $urandom_range(0, g * 128 - 1);
        mode = wb_mode_e'(m); re = 1; raddr = 10'(a);
        @(negedge clk); re = 0; raddr = '0; mode = WB_UMA;
        for (int p = 0; p < 8; p++) begin
          logic [1023:0] e;
          int bank;
          bank = (p / g) * g + (a / 128);
          for (int s = 0; s < 16; s++) e[s*64 +: 64] = ref_m[bank][s][a % 128];
          checks++;
          if (rdata[p] !== e) begin failures++; $display("mode %0d addr %0d PE %0d wrong bank", m, a, p); end
        end
      end
    end
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
