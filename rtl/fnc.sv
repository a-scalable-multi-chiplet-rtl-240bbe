// fnc: one Flexible Neural Core (neural-network core).
//
// Eight Flexible Tensor PEs (each: L1 buffer, 8x16 dynamic bit-width MAC
// array, post-processing), a configurable weight buffer shared by the PEs
// in UMA / dual / quad / full NUMA mode, a unified LLC, the flexible
// interconnect (LLC to L1 multicast, PE results back to LLC), element-wise,
// pooling and scaling units, and the instruction controller.
//
// Host port (stands in for the core's IO DMA): one 64-bit word per cycle,
// word address host_addr[19:0]; read data arrives in host_rdata with
// host_rvalid one cycle after a read request.
//   addr[19:18] = 0 : LLC word addr[14:0]
//   addr[19:18] = 1 : weight buffer, bank addr[13:11], row addr[10:4],
//                     sub-bank (= MAC column) addr[3:0]; write only
//   addr[19:18] = 3 : addr[0] = 0 writes an instruction and starts it;
//                     addr[0] = 1 reads status {done count[31:0], busy}
// Instructions written while the core is busy are dropped; the host polls
// the status word. The block structure follows the design; the host port,
// memory map and sizes are this implementation's choices.
module fnc
  import accel_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         host_req,
  input  logic         host_we,
  input  logic [19:0]  host_addr,
  input  logic [63:0]  host_wdata,
  output logic         host_rvalid,
  output logic [63:0]  host_rdata,
  output logic         busy
);
  // ---------------- host decode ----------------
  logic [1:0] region;
  assign region = host_addr[19:18];

  logic        a_en;
  logic [63:0] a_rdata;
  assign a_en = host_req && (region == REG_LLC);

  logic wb_we;
  assign wb_we = host_req && host_we && (region == REG_WB);

  logic start, done;
  assign start = host_req && host_we && (region == REG_CTRL) && !host_addr[0] && !busy;

  logic [31:0] done_cnt;
  logic [1:0]  rsel_q;   // 0 none, 1 LLC, 2 status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_cnt    <= '0;
      rsel_q      <= '0;
      host_rvalid <= 1'b0;
    end else begin
      if (done) done_cnt <= done_cnt + 1'b1;
      host_rvalid <= host_req && !host_we;
      rsel_q      <= (region == REG_LLC) ? 2'd1 : (region == REG_CTRL) ? 2'd2 : 2'd0;
    end
  end
  always_comb begin
    unique case (rsel_q)
      2'd1:    host_rdata = a_rdata;
      2'd2:    host_rdata = {31'd0, done_cnt, busy};
      default: host_rdata = '0;
    endcase
  end

  // ---------------- controller ----------------
  logic        b_en, b_we;
  logic [14:0] b_addr;
  logic [63:0] b_wdata, b_rdata;
  logic        sc_valid;
  logic [NPE-1:0] sc_mask;
  logic [9:0]  sc_addr;
  logic [2:0]  g_pe;
  logic [1:0]  g_word;
  logic [63:0] g_data;
  wb_mode_e    wb_mode;
  logic        wb_re;
  logic [9:0]  wb_raddr;
  prec_e       prec;
  logic [4:0]  shift;
  logic        relu;
  logic        step_issue, step_first;
  logic [9:0]  l1_raddr;
  logic [2:0]  n_words [NPE];
  logic [63:0] va, vb, y_eltw, y_pool, y_scale;
  logic [7:0]  vmult;
  logic [3:0]  vshift;

  fnc_ctrl u_ctrl (
    .clk, .rst_n, .instr(host_wdata), .start, .busy, .done,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .sc_valid, .sc_mask, .sc_addr, .g_pe, .g_word, .g_data,
    .wb_mode, .wb_re, .wb_raddr, .prec, .shift, .relu,
    .step_issue, .step_first, .l1_raddr, .n_words(n_words[0]),
    .va, .vb, .vmult, .vshift, .y_eltw, .y_pool, .y_scale
  );

  // ---------------- memories ----------------
  llc_buffer #(.DEPTH(LLC_DEPTH), .WIDTH(64)) u_llc (
    .clk,
    .a_en, .a_we(host_we), .a_addr(host_addr[14:0]), .a_wdata(host_wdata), .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  logic [WROW_W-1:0] wrow [NPE];
  weight_buffer #(.BANKS(NPE), .SUBBANKS(COLS), .ROWS(WB_ROWS), .SUB_W(PAIRS*16)) u_wb (
    .clk, .rst_n, .mode(wb_mode),
    .we(wb_we), .wbank(host_addr[13:11]), .wrow(host_addr[10:4]), .wsub(host_addr[3:0]),
    .wdata(host_wdata),
    .re(wb_re), .raddr(wb_raddr), .rdata(wrow)
  );

  // ---------------- interconnect and PEs ----------------
  logic [NPE-1:0]       l1_we;
  logic [9:0]           l1_waddr;
  logic [63:0]          l1_wdata;
  logic [COLS*16-1:0]   pe_out [NPE];

  flex_interconnect #(.NPE(NPE), .WIDTH(64), .AW(10), .OWORDS(COLS*16/64)) u_ic (
    .clk, .rst_n,
    .sc_valid, .sc_mask, .sc_addr, .sc_data(b_rdata),
    .l1_we, .l1_waddr, .l1_wdata,
    .g_pe, .g_word, .pe_out, .g_data
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe_inst
    flex_pe #(.L1D(L1_DEPTH)) u_pe (
      .clk, .rst_n, .mode(prec), .shift, .relu,
      .l1_we(l1_we[p]), .l1_waddr, .l1_wdata,
      .step_issue, .step_first, .l1_raddr,
      .wgt(wrow[p]),
      .out_bits(pe_out[p]), .n_words(n_words[p])
    );
  end

  // ---------------- vector units ----------------
  eltwise_unit #(.LANES(8)) u_eltw  (.a(va), .b(vb), .y(y_eltw));
  pooling_unit #(.LANES(8)) u_pool  (.a(va), .b(vb), .y(y_pool));
  scaling_unit #(.LANES(8)) u_scale (.a(va), .mult(vmult), .shift(vshift), .y(y_scale));
endmodule
