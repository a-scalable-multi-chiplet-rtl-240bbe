// tb_mac_array: drives a reduced MAC array (4 columns) with random steps in
// each precision mode and checks every accumulator against a reference
// after each step, including the two-cycle step latency and the clearing
// by step_first.
module tb_mac_array;
  import accel_pkg::*;
  localparam int NC = 4, NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  prec_e mode = PREC_A8W8;
  logic step_valid = 0, step_first = 0;
  logic [NC*NP*16-1:0] wgt = '0;
  logic [NP*16-1:0] act = '0;
  logic signed [ACC_W-1:0] acc_a [NC];
  logic signed [ACC_W-1:0] acc_b [NC];
  int checks = 0, failures = 0;

  mac_array #(.NCOL(NC), .NPAIR(NP)) dut (.*);

  function automatic int sx(logic [15:0] v, int bits);
    int r;
    r = int'(v) & ((1 << bits) - 1);
    if (r >= (1 << (bits - 1))) r -= (1 << bits);
    return r;
  endfunction

  longint ea [NC], eb [NC];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      mode = prec_e'(m);
      for (int s = 0; s < 6; s++) begin
        @(negedge clk);
        step_valid = 1; step_first = (s == 0);
        for (int i = 0; i < NC*NP; i++) wgt[i*16 +: 16] = 16'($urandom());
        for (int i = 0; i < NP; i++) act[i*16 +: 16] = 16'($urandom());
        if (s == 0) for (int c = 0; c < NC; c++) begin ea[c] = 0; eb[c] = 0; end
        for (int c = 0; c < NC; c++)
          for (int p = 0; p < NP; p++) begin
            logic [15:0] a, w;
            a = act[p*16 +: 16]; w = wgt[(c*NP+p)*16 +: 16];
            case (m)
              0: ea[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:0]),8) + sx(16'(a[15:8]),8)*sx(16'(w[15:8]),8);
              1: begin
                ea[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:4]),4) + sx(16'(a[15:8]),8)*sx(16'(w[15:12]),4);
                eb[c] += sx(16'(a[7:0]),8)*sx(16'(w[3:0]),4) + sx(16'(a[15:8]),8)*sx(16'(w[11:8]),4);
              end
              default: ea[c] += longint'(sx(a,16)) * sx(16'(w[7:0]),8);
            endcase
          end
        @(negedge clk);
        step_valid = 0;
        @(negedge clk);
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (longint'(acc_a[c]) != ea[c] || longint'(acc_b[c]) != eb[c]) begin
            failures++;
            $display("mode %0d step %0d col %0d: got %0d %0d exp %0d %0d", m, s, c, acc_a[c], acc_b[c], ea[c], eb[c]);
          end
        end
      end
    end
    // back-to-back steps: result two cycles after the last one
    @(negedge clk);
    mode = PREC_A8W8;
    for (int c = 0; c < NC; c++) ea[c] = 0;
    for (int s = 0; s < 3; s++) begin
      step_valid = 1; step_first = (s == 0);
      wgt = '0; act = '0;
      for (int c = 0; c < NC; c++) wgt[(c*NP)*16 +: 8] = 8'(c + 1);
      act[7:0] = 8'(s + 2);
      for (int c = 0; c < NC; c++) ea[c] += (c + 1) * (s + 2);
      @(negedge clk);
    end
    step_valid = 0;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (longint'(acc_a[c]) != ea[c]) begin failures++; $display("pipelined col %0d got %0d exp %0d", c, acc_a[c], ea[c]); end
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
