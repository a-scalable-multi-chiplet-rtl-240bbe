// tb_fnc: self-checking test of one Flexible Neural Core.
//
// Loads random weights and activations through the host port, then for every
// precision mode (8x8, 8x4, 16x8) and every weight-buffer mode (UMA, dual,
// quad, full NUMA) runs LOADL1 (unicast and multicast) and CONV, reads all
// eight PEs' results back and compares them with a reference computed here
// with plain integer arithmetic. The weight rows used cross a bank
// boundary, so the merged-bank addressing is exercised. It also checks the
// CONV latency (busy for k + 4 + 8*n_words cycles) and the ELTW, POOL and
// SCALE vector instructions.
module tb_fnc;
  import accel_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_req = 0, host_we = 0;
  logic [19:0] host_addr = '0;
  logic [63:0] host_wdata = '0;
  logic        host_rvalid;
  logic [63:0] host_rdata;
  logic        busy;

  fnc dut (.*);

  int checks = 0, failures = 0;

  // shadows
  logic [63:0] wmem [8][16][128];
  logic [63:0] l1s  [8][1024];
  logic [63:0] llcs [0:4095];

  task automatic hw(input logic [19:0] a, input logic [63:0] d);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask
  task automatic hr(input logic [19:0] a, output logic [63:0] d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = a;
    @(negedge clk); host_req = 0;
    d = host_rdata;
    if (!host_rvalid) begin failures++; $display("rvalid missing"); end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic int sx(logic [15:0] v, int bits);
    int r;
    r = int'(v) & ((1 << bits) - 1);
    if (r >= (1 << (bits - 1))) r -= (1 << bits);
    return r;
  endfunction

  function automatic longint rq(longint x, int sh, bit relu, int bits);
    longint r, hi, lo;
    r = (sh == 0) ? x : ((x + (longint'(1) << (sh - 1))) >>> sh);
    if (relu && r < 0) r = 0;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  task automatic write_weights();
    for (int b = 0; b < 8; b++)
      for (int s = 0; s < 16; s++)
        for (int r = 0; r < 128; r++)
          if (r < 4 || r >= 124) begin
            wmem[b][s][r] = rnd64();
            hw({2'd1, 4'd0, 3'(b), 7'(r), 4'(s)}, wmem[b][s][r]);
          end
  endtask

  task automatic run_instr(input logic [63:0] ins, output int cyc);
    hw({2'd3, 17'd0, 1'b0}, ins);
    cyc = 1;  // start cycle ends with busy rising
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  task automatic conv_case(input prec_e prec, input wb_mode_e wm, input bit multicast);
    ins_load_t il;
    ins_conv_t ic;
    int k, cyc, nw, g;
    logic [4:0] sh;
    bit rl;
    k  = 4;
    sh = 5'($urandom_range(0, 9));
    rl = 1'($urandom_range(0, 1));
    // activations into LLC, then into L1
    for (int i = 0; i < 8 * k; i++) begin
      llcs[i] = rnd64();
      hw({2'd0, 3'd0, 15'(i)}, llcs[i]);
    end
    if (multicast) begin
      il = '{op: OP_LOADL1, mask: 8'hff, src: 15'd0, dst: 10'd100, cnt: 11'(k), rsvd: '0};
      run_instr(il, cyc);
      for (int p = 0; p < 8; p++) for (int i = 0; i < k; i++) l1s[p][100+i] = llcs[i];
    end else begin
      for (int p = 0; p < 8; p++) begin
        il = '{op: OP_LOADL1, mask: 8'(1 << p), src: 15'(p*k), dst: 10'd100, cnt: 11'(k), rsvd: '0};
        run_instr(il, cyc);
        for (int i = 0; i < k; i++) l1s[p][100+i] = llcs[p*k+i];
      end
    end
    ic = '{op: OP_CONV, prec: prec, wbmode: wm, l1a: 10'd100, wa: 10'd126, k: 11'(k),
           dst: 15'd1000, shift: sh, relu: rl, rsvd: '0};
    run_instr(ic, cyc);
    nw = (prec == PREC_A8W8) ? 2 : 4;
    checks++;
    // busy lasts k + 4 + 8*n_words cycles; cyc also counts the write cycle
    if (cyc != k + 4 + 8*nw + 1) begin
      failures++; $display("CONV latency %0d, expected %0d", cyc, k + 4 + 8*nw + 1);
    end
    g = 1 << int'(wm);
    for (int p = 0; p < 8; p++) begin
      longint acc_a [16], acc_b [16];
      logic [255:0] exp_bits;
      for (int c = 0; c < 16; c++) begin acc_a[c] = 0; acc_b[c] = 0; end
      for (int i = 0; i < k; i++) begin
        int r, bank, row;
        logic [63:0] act;
        r = 126 + i;
        if (g == 1) begin bank = p; row = r % 128; end
        else begin bank = (p / g) * g + ((r / 128) % g); row = r % 128; end
        act = l1s[p][100+i];
        for (int c = 0; c < 16; c++)
          for (int q = 0; q < 4; q++) begin
            logic [15:0] a, w;
            a = act[q*16 +: 16];
            w = wmem[bank][c][row][q*16 +: 16];
            unique case (prec)
              PREC_A8W8: acc_a[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:0]),8) + sx(16'(a[15:8]),8)*sx(16'(w[15:8]),8);
              PREC_A8W4: begin
                acc_a[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:4]),4) + sx(16'(a[15:8]),8)*sx(16'(w[15:12]),4);
                acc_b[c] += sx(16'(a[7:0]),8)*sx(16'(w[3:0]),4) + sx(16'(a[15:8]),8)*sx(16'(w[11:8]),4);
              end
              default:   acc_a[c] += longint'(sx(a,16)) * sx(16'(w[7:0]),8);
            endcase
          end
      end
      exp_bits = '0;
      for (int c = 0; c < 16; c++) begin
        unique case (prec)
          PREC_A8W8: exp_bits[c*8 +: 8] = 8'(rq(acc_a[c], sh, rl, 8));
          PREC_A8W4: begin
            exp_bits[2*c*8 +: 8]     = 8'(rq(acc_a[c], sh, rl, 8));
            exp_bits[(2*c+1)*8 +: 8] = 8'(rq(acc_b[c], sh, rl, 8));
          end
          default: exp_bits[c*16 +: 16] = 16'(rq(acc_a[c], sh, rl, 16));
        endcase
      end
      for (int w = 0; w < nw; w++) begin
        logic [63:0] d;
        hr({2'd0, 3'd0, 15'(1000 + p*nw + w)}, d);
        checks++;
        if (d !== exp_bits[w*64 +: 64]) begin
          failures++;
          $display("prec %0d wm %0d PE %0d word %0d: got %h exp %h", prec, wm, p, w, d, exp_bits[w*64 +: 64]);
        end
      end
    end
  endtask

  task automatic vec_case(input op_e op);
    ins_vec_t iv;
    int cyc, n;
    logic [7:0] mult;
    logic [3:0] sh;
    n = 6;
    mult = 8'($urandom());
    sh = 4'($urandom_range(0, 6));
    for (int i = 0; i < n; i++) begin
      llcs[2000+i] = rnd64(); hw({2'd0, 3'd0, 15'(2000+i)}, llcs[2000+i]);
      llcs[2100+i] = rnd64(); hw({2'd0, 3'd0, 15'(2100+i)}, llcs[2100+i]);
    end
    iv = '{op: op, src0: 15'd2000, src1: (op == OP_SCALE) ? {7'd0, mult} : 15'd2100,
           dst: 15'd2200, cnt: 11'(n), shift: sh};
    run_instr(iv, cyc);
    checks++;
    if (cyc != 3*n + 2) begin failures++; $display("vec latency %0d", cyc); end
    for (int i = 0; i < n; i++) begin
      logic [63:0] d, e;
      for (int l = 0; l < 8; l++) begin
        int a, b, y;
        a = sx(16'(llcs[2000+i][l*8 +: 8]), 8);
        b = sx(16'(llcs[2100+i][l*8 +: 8]), 8);
        unique case (op)
          OP_ELTW: y = int'(rq(a + b, 0, 0, 8));
          OP_POOL: y = (a > b) ? a : b;
          default: y = int'(rq(longint'(a * sx(16'(mult), 8)), int'(sh), 0, 8));
        endcase
        e[l*8 +: 8] = 8'(y);
      end
      hr({2'd0, 3'd0, 15'(2200+i)}, d);
      checks++;
      if (d !== e) begin failures++; $display("vec op %0d word %0d got %h exp %h", op, i, d, e); end
    end
  endtask

  initial begin
    logic [63:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_weights();
    for (int pm = 0; pm < 3; pm++)
      for (int wm = 0; wm < 4; wm++)
        conv_case(prec_e'(pm), wb_mode_e'(wm), (pm + wm) % 3 == 0);
    vec_case(OP_ELTW);
    vec_case(OP_POOL);
    vec_case(OP_SCALE);
    hr({2'd3, 17'd0, 1'b1}, st);
    checks++;
    if (st[0] != 1'b0 || st[32:1] == 0) begin failures++; $display("status %h", st); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
