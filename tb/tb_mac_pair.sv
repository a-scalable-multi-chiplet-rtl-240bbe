// tb_mac_pair: checks the dynamic bit-width MAC pair in all three modes
// against plain integer products, with random and corner operands.
module tb_mac_pair;
  import accel_pkg::*;
  prec_e mode;
  logic [15:0] act, wgt;
  logic signed [PSUM_W-1:0] psum_a, psum_b;
  int checks = 0, failures = 0;

  mac_pair dut (.*);

  function automatic int sx(logic [15:0] v, int bits);
    int r;
    r = int'(v) & ((1 << bits) - 1);
    if (r >= (1 << (bits - 1))) r -= (1 << bits);
    return r;
  endfunction

  task automatic check(prec_e m, logic [15:0] a, logic [15:0] w);
    int ea, eb;
    mode = m; act = a; wgt = w;
    #1;
    unique case (m)
      PREC_A8W8: begin ea = sx(16'(a[7:0]),8)*sx(16'(w[7:0]),8) + sx(16'(a[15:8]),8)*sx(16'(w[15:8]),8); eb = 0; end
      PREC_A8W4: begin
        ea = sx(16'(a[7:0]),8)*sx(16'(w[7:4]),4) + sx(16'(a[15:8]),8)*sx(16'(w[15:12]),4);
        eb = sx(16'(a[7:0]),8)*sx(16'(w[3:0]),4) + sx(16'(a[15:8]),8)*sx(16'(w[11:8]),4);
      end
      default: begin ea = sx(a,16)*sx(16'(w[7:0]),8); eb = 0; end
    endcase
    checks++;
    if (int'(psum_a) != ea || int'(psum_b) != eb) begin
      failures++;
      $display("mode %0d act %h wgt %h: got %0d %0d exp %0d %0d", m, a, w, psum_a, psum_b, ea, eb);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h8080, 16'h7f7f, 16'hffff, 16'h8000, 16'h7fff};
    for (int m = 0; m < 3; m++) begin
      foreach (corner[i]) foreach (corner[j]) check(prec_e'(m), corner[i], corner[j]);
      repeat (2000) check(prec_e'(m), 16'($urandom()), 16'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
