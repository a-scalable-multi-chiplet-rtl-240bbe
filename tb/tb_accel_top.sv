// tb_accel_top: end-to-end test of the seven-chiplet accelerator.
//
// Acting as the host, it sends packets to all ten cores (four on the HUB,
// six on SIDE chiplets reached through router units and die-to-die links):
// it writes weights and activations, loads the L1 buffers (multicast on
// some cores, one PE at a time on others), runs one convolution step
// sequence on every core with its own precision mode and weight-buffer
// mode, reads all results back and compares them with a reference computed
// here. It also runs the element-wise, pooling and scaling instructions.
// Along the way it counts the mechanisms of the design and fails if one
// never happened: each precision mode, each weight-buffer mode, multicast
// and unicast L1 loads, 4 KB splitting of a request, credit stalls on the
// HUB and SIDE links, response arbitration conflicts in the router.
module tb_accel_top;
  import accel_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_in_valid = 0, host_in_ready;
  logic [63:0] host_in_data = '0;
  logic        host_out_valid, host_out_ready = 1;
  logic [63:0] host_out_data;
  logic [5:0]  psel = '0;
  logic        penable = 0, pwrite = 0;
  logic [3:0]  paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic        pready;
  logic [5:0]  rreq_valid, rreq_ready = '1;
  logic [63:0] rreq_data [6];
  logic [9:0]  core_busy;
  logic [5:0]  hub_link_stalled, side_link_stalled;
  logic        conflict;

  accel_top dut (.*);

  int checks = 0, failures = 0;
  int n_prec [3], n_wbm [4], n_mcast = 0, n_ucast = 0, n_split = 0;
  int n_hstall = 0, n_sstall = 0, n_conflict = 0, n_vec [3];

  always @(posedge clk) begin
    if (|hub_link_stalled)  n_hstall++;
    if (|side_link_stalled) n_sstall++;
    if (conflict)           n_conflict++;
  end

  // ---------------- host transmit queue ----------------
  logic [63:0] txq [$];
  // drive: present the queue head; pop on handshake at the clock edge
  always @(posedge clk) begin
    if (rst_n && host_in_valid && host_in_ready) void'(txq.pop_front());
  end
  always @(negedge clk) begin
    host_in_valid = rst_n && (txq.size() > 0);
    host_in_data  = (txq.size() > 0) ? txq[0] : '0;
  end

  // ---------------- host receive ----------------
  logic [63:0] rmem [longint];
  bit    rx_in_pkt = 0;
  head_t rx_h;
  int    rx_n;
  bit    throttle = 0, hold = 0;
  always @(negedge clk) host_out_ready = hold ? 1'b0 : throttle ? ($urandom_range(0, 15) == 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && host_out_valid && host_out_ready) begin
      if (!rx_in_pkt) begin
        rx_h = head_t'(host_out_data);
        rx_n = 0;
        if (rx_h.kind != PK_RESP) begin failures++; $display("unexpected packet kind"); end
        else if (rx_h.len != 0) rx_in_pkt = 1;
      end else begin
        rmem[{32'(rx_h.target), rx_h.addr + 32'(rx_n)}] = host_out_data;
        rx_n++;
        if (rx_n == int'(rx_h.len)) rx_in_pkt = 0;
      end
    end
  end

  function automatic logic [63:0] mkhead(pkind_e k, int tgt, int len, logic [31:0] addr);
    head_t h;
    h = '{kind: k, target: 4'(tgt), len: 12'(len), tag: 12'h0, addr: addr};
    return 64'(h);
  endfunction

  task automatic send_write(int tgt, logic [31:0] addr, logic [63:0] d [$]);
    txq.push_back(mkhead(PK_WRITE, tgt, d.size(), addr));
    foreach (d[i]) txq.push_back(d[i]);
  endtask

  task automatic send_read(int tgt, logic [31:0] addr, int len);
    for (int i = 0; i < len; i++) rmem.delete({32'(tgt), addr + 32'(i)});
    txq.push_back(mkhead(PK_READ, tgt, len, addr));
  endtask

  task automatic wait_words(int tgt, logic [31:0] addr, int len);
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < len; i++) if (!rmem.exists({32'(tgt), addr + 32'(i)})) all = 0;
    end while (!all);
  endtask

  localparam logic [31:0] CTRL = 32'h000C_0000;
  task automatic wait_idle(int tgt);
    logic [63:0] st;
    do begin
      send_read(tgt, CTRL | 32'd1, 1);
      wait_words(tgt, CTRL | 32'd1, 1);
      st = rmem[{32'(tgt), CTRL | 32'd1}];
    end while (st[0] || txq.size() != 0);
  endtask

  task automatic instr(int tgt, logic [63:0] ins);
    logic [63:0] d [$];
    d = {ins};
    send_write(tgt, CTRL, d);
    wait_idle(tgt);
  endtask

  // ---------------- reference ----------------
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

  localparam int K = 4;
  localparam int SRC = 500;     // activations at LLC 500..531: crosses a 4 KB page
  logic [63:0] wts  [10][8][16][4];   // core, bank, sub-bank, row
  logic [63:0] acts [10][8*K];
  int          precs [10], wbms [10], shs [10];
  bit          rls [10], mc [10];

  task automatic check_core(int t);
    int g, nw;
    g  = 1 << wbms[t];
    nw = (precs[t] == 0) ? 2 : 4;
    for (int p = 0; p < 8; p++) begin
      longint aa [16], ab [16];
      logic [255:0] eb;
      for (int c = 0; c < 16; c++) begin aa[c] = 0; ab[c] = 0; end
      for (int i = 0; i < K; i++) begin
        int bank;
        logic [63:0] act;
        bank = (p / g) * g;      // rows 0..3 lie in the first bank of the group
        act  = mc[t] ? acts[t][i] : acts[t][p*K + i];
        for (int c = 0; c < 16; c++)
          for (int q = 0; q < 4; q++) begin
            logic [15:0] a, w;
            a = act[q*16 +: 16];
            w = wts[t][bank][c][i][q*16 +: 16];
            case (precs[t])
              0: aa[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:0]),8) + sx(16'(a[15:8]),8)*sx(16'(w[15:8]),8);
              1: begin
                aa[c] += sx(16'(a[7:0]),8)*sx(16'(w[7:4]),4) + sx(16'(a[15:8]),8)*sx(16'(w[15:12]),4);
                ab[c] += sx(16'(a[7:0]),8)*sx(16'(w[3:0]),4) + sx(16'(a[15:8]),8)*sx(16'(w[11:8]),4);
              end
              default: aa[c] += longint'(sx(a,16)) * sx(16'(w[7:0]),8);
            endcase
          end
      end
      eb = '0;
      for (int c = 0; c < 16; c++)
        case (precs[t])
          0: eb[c*8 +: 8] = 8'(rq(aa[c], shs[t], rls[t], 8));
          1: begin
            eb[2*c*8 +: 8]     = 8'(rq(aa[c], shs[t], rls[t], 8));
            eb[(2*c+1)*8 +: 8] = 8'(rq(ab[c], shs[t], rls[t], 8));
          end
          default: eb[c*16 +: 16] = 16'(rq(aa[c], shs[t], rls[t], 16));
        endcase
      for (int w = 0; w < nw; w++) begin
        checks++;
        if (rmem[{32'(t), 32'(1000 + p*nw + w)}] !== eb[w*64 +: 64]) begin
          failures++;
          $display("core %0d PE %0d word %0d: got %h exp %h", t, p, w,
                   rmem[{32'(t), 32'(1000 + p*nw + w)}], eb[w*64 +: 64]);
        end
      end
    end
  endtask

  task automatic apb_read(int port, int reg_i, output logic [31:0] d);
    @(negedge clk); psel = 6'(1 << port); paddr = 4'(reg_i * 4); pwrite = 0; penable = 0;
    @(negedge clk); penable = 1;
    @(posedge clk); d = prdata;
    @(negedge clk); psel = '0; penable = 0;
  endtask

  initial begin
    logic [63:0] d [$];
    logic [31:0] r;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // ---- weights and activations for every core ----
    for (int t = 0; t < 10; t++) begin
      precs[t] = t % 3;
      wbms[t]  = t % 4;
      shs[t]   = $urandom_range(0, 8);
      rls[t]   = 1'($urandom_range(0, 1));
      mc[t]    = (t % 2 == 0);
      for (int b = 0; b < 8; b++) begin
        d = {};
        for (int r4 = 0; r4 < 4; r4++)
          for (int s = 0; s < 16; s++) begin
            wts[t][b][s][r4] = {$urandom(), $urandom()};
            d.push_back(wts[t][b][s][r4]);
          end
        send_write(t, {12'h000, 2'd1, 4'd0, 3'(b), 11'd0}, d);
      end
      d = {};
      for (int i = 0; i < 8*K; i++) begin
        acts[t][i] = {$urandom(), $urandom()};
        d.push_back(acts[t][i]);
      end
      send_write(t, 32'(SRC), d);
    end
    // ---- L1 loads, then CONV, core by core ----
    for (int t = 0; t < 10; t++) begin
      ins_load_t il;
      ins_conv_t ic;
      if (mc[t]) begin
        il = '{op: OP_LOADL1, mask: 8'hff, src: 15'(SRC), dst: 10'd0, cnt: 11'(K), rsvd: '0};
        instr(t, 64'(il));
        n_mcast++;
      end else begin
        for (int p = 0; p < 8; p++) begin
          il = '{op: OP_LOADL1, mask: 8'(1 << p), src: 15'(SRC + p*K), dst: 10'd0, cnt: 11'(K), rsvd: '0};
          instr(t, 64'(il));
        end
        n_ucast++;
      end
      ic = '{op: OP_CONV, prec: prec_e'(precs[t]), wbmode: wb_mode_e'(wbms[t]), l1a: 10'd0,
             wa: 10'd0, k: 11'(K), dst: 15'd1000, shift: 5'(shs[t]), relu: rls[t], rsvd: '0};
      d = {64'(ic)};
      send_write(t, CTRL, d);
      n_prec[precs[t]]++;
      n_wbm[wbms[t]]++;
    end
    for (int t = 0; t < 10; t++) wait_idle(t);
    // ---- read all results at once, with a slow host ----
    throttle = 1;
    for (int t = 0; t < 10; t++) send_read(t, 32'd1000, 32);
    for (int t = 0; t < 10; t++) wait_words(t, 32'd1000, 32);
    throttle = 0;
    for (int t = 0; t < 10; t++) check_core(t);
    // ---- a long read from SIDE chiplet 1 while the host does not accept:
    //      the SIDE chiplet's link must run out of credits ----
    hold = 1;
    send_read(5, 32'd0, 200);
    for (int i = 0; i < 3000 && !side_link_stalled[1]; i++) @(posedge clk);
    hold = 0;
    wait_words(5, 32'd0, 200);
    // ---- a read then a long write to one SIDE chiplet: link back-pressure ----
    send_read(4, 32'd0, 64);
    d = {};
    for (int i = 0; i < 100; i++) d.push_back(64'(i) * 64'h0101_0101_0101);
    send_write(4, 32'd3000, d);
    wait_words(4, 32'd0, 64);
    send_read(4, 32'd3000, 100);
    wait_words(4, 32'd3000, 100);
    for (int i = 0; i < 100; i++) begin
      checks++;
      if (rmem[{32'd4, 32'(3000 + i)}] !== d[i]) begin failures++; $display("side write/read %0d", i); end
    end
    // ---- vector instructions on three cores ----
    for (int v = 0; v < 3; v++) begin
      int t;
      ins_vec_t iv;
      logic [63:0] a [$], b [$];
      t = (v == 0) ? 1 : (v == 1) ? 5 : 9;
      a = {}; b = {};
      for (int i = 0; i < 4; i++) begin a.push_back({$urandom(), $urandom()}); b.push_back({$urandom(), $urandom()}); end
      send_write(t, 32'd4000, a);
      send_write(t, 32'd4100, b);
      iv = '{op: op_e'(3 + v), src0: 15'd4000, src1: (v == 2) ? 15'd5 : 15'd4100, dst: 15'd4200,
             cnt: 11'd4, shift: 4'd1};
      instr(t, 64'(iv));
      send_read(t, 32'd4200, 4);
      wait_words(t, 32'd4200, 4);
      for (int i = 0; i < 4; i++)
        for (int l = 0; l < 8; l++) begin
          int x, y, e;
          x = sx(16'(a[i][l*8 +: 8]), 8);
          y = sx(16'(b[i][l*8 +: 8]), 8);
          e = (v == 0) ? int'(rq(longint'(x) + longint'(y), 0, 0, 8)) : (v == 1) ? ((x > y) ? x : y) : int'(rq(longint'(x) * 5, 1, 0, 8));
          checks++;
          if (rmem[{32'(t), 32'(4200 + i)}][l*8 +: 8] !== 8'(e)) begin
            failures++; $display("vec %0d core %0d word %0d lane %0d", v, t, i, l);
          end
        end
      n_vec[v]++;
    end
    // ---- split counters of the router units ----
    for (int p = 0; p < 6; p++) begin
      apb_read(p, 3, r);
      n_split += int'(r);
    end
    // ---- every mechanism must have happened ----
    for (int i = 0; i < 3; i++) begin checks++; if (n_prec[i] == 0) begin failures++; $display("prec %0d never", i); end end
    for (int i = 0; i < 4; i++) begin checks++; if (n_wbm[i] == 0) begin failures++; $display("wb mode %0d never", i); end end
    for (int i = 0; i < 3; i++) begin checks++; if (n_vec[i] == 0) begin failures++; $display("vec %0d never", i); end end
    checks++; if (n_mcast == 0)    begin failures++; $display("no multicast"); end
    checks++; if (n_ucast == 0)    begin failures++; $display("no unicast"); end
    checks++; if (n_split == 0)    begin failures++; $display("no 4 KB split"); end
    checks++; if (n_hstall == 0)   begin failures++; $display("no HUB link stall"); end
    checks++; if (n_sstall == 0)   begin failures++; $display("no SIDE link stall"); end
    checks++; if (n_conflict == 0) begin failures++; $display("no arbitration conflict"); end
    $display("mechanisms: prec %0d/%0d/%0d wb %0d/%0d/%0d/%0d mcast %0d ucast %0d split %0d hstall %0d sstall %0d conflict %0d vec %0d/%0d/%0d",
             n_prec[0], n_prec[1], n_prec[2], n_wbm[0], n_wbm[1], n_wbm[2], n_wbm[3], n_mcast, n_ucast,
             n_split, n_hstall, n_sstall, n_conflict, n_vec[0], n_vec[1], n_vec[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
