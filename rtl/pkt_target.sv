// pkt_target: packet endpoint that executes requests on a core's host port.
//
// Takes packets from the flit stream in_*: a PK_WRITE head is followed by
// len data flits, each written to addr, addr+1, ...; a PK_READ head is
// answered on out_* by a PK_RESP head (same target, len, tag and addr)
// followed by len data flits read from addr, addr+1, .... This is the
// "data parser" function of the router: serving a request that arrives
// from another chiplet by accessing memory. Memory port: one request per
// cycle, read data one cycle later (mem_rvalid). Reads are issued one at a
// time, each as soon as the previous word has left, so a read response
// streams one flit every two cycles. Packet format: accel_pkg::head_t.
module pkt_target
  import accel_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         mem_req,
  output logic         mem_we,
  output logic [19:0]  mem_addr,
  output logic [63:0]  mem_wdata,
  input  logic         mem_rvalid,
  input  logic [63:0]  mem_rdata
);
  typedef enum logic [2:0] {T_HEAD, T_WDATA, T_RHEAD, T_RISSUE, T_RWAIT, T_RSEND} tstate_e;
  tstate_e     st;
  head_t       h;
  logic [11:0] n;
  logic [63:0] rbuf;
  head_t       in_h;
  assign in_h = head_t'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= T_HEAD;
      h    <= '0;
      n    <= '0;
      rbuf <= '0;
    end else begin
      unique case (st)
        T_HEAD: if (in_valid) begin
          h <= in_h;
          n <= '0;
          if (in_h.kind == PK_WRITE && in_h.len != 0) st <= T_WDATA;
          else if (in_h.kind == PK_READ) st <= T_RHEAD;
        end
        T_WDATA: if (in_valid) begin
          n <= n + 1'b1;
          if (n + 1'b1 == h.len) st <= T_HEAD;
        end
        T_RHEAD: if (out_ready) st <= (h.len == 0) ? T_HEAD : T_RISSUE;
        T_RISSUE: st <= T_RWAIT;
        T_RWAIT: if (mem_rvalid) begin
          rbuf <= mem_rdata;
          st   <= T_RSEND;
        end
        T_RSEND: if (out_ready) begin
          n  <= n + 1'b1;
          st <= (n + 1'b1 == h.len) ? T_HEAD : T_RISSUE;
        end
        default: st <= T_HEAD;
      endcase
    end
  end

  always_comb begin
    in_ready  = (st == T_HEAD) || (st == T_WDATA);
    out_valid = (st == T_RHEAD) || (st == T_RSEND);
    out_data  = (st == T_RHEAD) ? 64'({PK_RESP, h.target, h.len, h.tag, h.addr}) : rbuf;
    mem_req   = ((st == T_WDATA) && in_valid) || (st == T_RISSUE);
    mem_we    = (st == T_WDATA);
    mem_addr  = 20'(h.addr + 32'(n));
    mem_wdata = in_data;
  end
endmodule
