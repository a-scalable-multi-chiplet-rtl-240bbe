// clru: chiplet router unit, one per die-to-die port of the HUB chiplet.
//
// Four FIFO queues absorb bursts between the HUB and the die-to-die link:
//   FIFO0  HUB requests on their way to the link (after 4 KB splitting)
//   FIFO1  everything arriving from the link
//   FIFO2  responses for the HUB (PK_RESP packets)
//   FIFO3  requests from the remote chiplet for HUB memory
// 4 KB boundary processing: a request whose word range crosses a 4 KB page
// (PAGE_WORDS 64-bit words) is cut into several packets, one per page, each
// with its own head; a read is thus answered by several responses.
// Data parser: reads the head of each packet from FIFO1 and, by its kind
// (the head says the transfer mode), sends the whole packet to FIFO2 or
// FIFO3; PK_READ heads carry no data flits, the others len flits.
// Config registers on APB (word offset paddr[3:2]):
//   0  control, bit 0 = enable (reset 1); while 0 no HUB request is taken
//   1  packets sent, 2 packets received, 3 packets created by splitting
//   (1-3 read only). pready is always high.
// The blocks (config register, four FIFOs, parser, 4 KB processing) follow
// the design; which traffic each FIFO holds, the packet format and the
// register map are this implementation's choices. The design places the
// 4 KB processing on the path from the parser to the HUB's bus; here it
// splits the HUB's outgoing requests, which is where a request can cross a
// page in this packet-based fabric.
module clru
  import accel_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // APB
  input  logic         psel,
  input  logic         penable,
  input  logic         pwrite,
  input  logic [3:0]   paddr,
  input  logic [31:0]  pwdata,
  output logic [31:0]  prdata,
  output logic         pready,
  // HUB side
  input  logic         hub_in_valid,
  output logic         hub_in_ready,
  input  logic [63:0]  hub_in_data,
  output logic         hub_out_valid,
  input  logic         hub_out_ready,
  output logic [63:0]  hub_out_data,
  output logic         rreq_valid,
  input  logic         rreq_ready,
  output logic [63:0]  rreq_data,
  // link side
  output logic         d2d_out_valid,
  input  logic         d2d_out_ready,
  output logic [63:0]  d2d_out_data,
  input  logic         d2d_in_valid,
  output logic         d2d_in_ready,
  input  logic [63:0]  d2d_in_data
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- config registers ----------------
  logic        enable;
  logic [31:0] n_sent, n_recv, n_split;
  assign pready = 1'b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enable <= 1'b1;
    else if (psel && penable && pwrite && paddr[3:2] == 2'd0) enable <= pwdata[0];
  end
  always_comb begin
    unique case (paddr[3:2])
      2'd0:    prdata = {31'd0, enable};
      2'd1:    prdata = n_sent;
      2'd2:    prdata = n_recv;
      default: prdata = n_split;
    endcase
  end

  // ---------------- 4 KB boundary processing ----------------
  typedef enum logic [1:0] {SP_IDLE, SP_HEAD, SP_DATA} sp_e;
  sp_e         sp;
  head_t       hh;          // head being emitted (addr = current address)
  logic [11:0] rem;         // words still to send in this request
  logic [11:0] dcnt;        // data flits left in the current packet
  logic [9:0]  page_left;
  logic [11:0] chunk;
  logic        f0_in_valid, f0_in_ready;
  logic [63:0] f0_in_data;
  logic        has_data;
  head_t       in_h;
  assign in_h = head_t'(hub_in_data);

  assign page_left = 10'(PAGE_WORDS) - 10'(hh.addr[$clog2(PAGE_WORDS)-1:0]);
  assign chunk     = (rem < 12'(page_left)) ? rem : 12'(page_left);
  assign has_data  = (hh.kind != PK_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp      <= SP_IDLE;
      hh      <= '0;
      rem     <= '0;
      dcnt    <= '0;
      n_sent  <= '0;
      n_split <= '0;
    end else begin
      unique case (sp)
        SP_IDLE: if (hub_in_valid && enable) begin
          hh  <= in_h;
          rem <= in_h.len;
          sp  <= SP_HEAD;
        end
        SP_HEAD: if (f0_in_ready) begin
          n_sent  <= n_sent + 1'b1;
          if (rem != hh.len) n_split <= n_split + 1'b1;
          rem     <= rem - chunk;
          hh.addr <= hh.addr + 32'(chunk);
          dcnt    <= chunk;
          if (has_data && chunk != 0) sp <= SP_DATA;
          else if (rem == chunk)      sp <= SP_IDLE;
        end
        SP_DATA: if (hub_in_valid && f0_in_ready) begin
          dcnt <= dcnt - 1'b1;
          if (dcnt == 12'd1) sp <= (rem == 0) ? SP_IDLE : SP_HEAD;
        end
        default: sp <= SP_IDLE;
      endcase
    end
  end

  always_comb begin
    hub_in_ready = 1'b0;
    f0_in_valid  = 1'b0;
    f0_in_data   = hub_in_data;
    unique case (sp)
      SP_IDLE: hub_in_ready = enable;
      SP_HEAD: begin
        f0_in_valid = 1'b1;
        f0_in_data  = 64'({hh.kind, hh.target, chunk, hh.tag, hh.addr});
      end
      SP_DATA: begin
        f0_in_valid  = hub_in_valid;
        hub_in_ready = f0_in_ready;
      end
      default: ;
    endcase
  end

  logic [CW-1:0] c0, c1, c2, c3;
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst_n,
    .in_valid(f0_in_valid), .in_ready(f0_in_ready), .in_data(f0_in_data),
    .out_valid(d2d_out_valid), .out_ready(d2d_out_ready), .out_data(d2d_out_data),
    .count(c0)
  );

  // ---------------- receive side: FIFO1 and data parser ----------------
  logic        f1_valid, f1_ready;
  logic [63:0] f1_data;
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n,
    .in_valid(d2d_in_valid), .in_ready(d2d_in_ready), .in_data(d2d_in_data),
    .out_valid(f1_valid), .out_ready(f1_ready), .out_data(f1_data),
    .count(c1)
  );

  typedef enum logic {PA_HEAD, PA_DATA} pa_e;
  pa_e         pa;
  logic        to_resp, to_resp_q;
  logic [11:0] pcnt;
  logic        f2_ready, f3_ready;
  head_t       ph;
  assign ph      = head_t'(f1_data);
  assign to_resp = (pa == PA_HEAD) ? (ph.kind == PK_RESP) : to_resp_q;
  assign f1_ready = to_resp ? f2_ready : f3_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa        <= PA_HEAD;
      to_resp_q <= 1'b0;
      pcnt      <= '0;
      n_recv    <= '0;
    end else if (f1_valid && f1_ready) begin
      if (pa == PA_HEAD) begin
        n_recv    <= n_recv + 1'b1;
        to_resp_q <= (ph.kind == PK_RESP);
        pcnt      <= ph.len;
        if (ph.kind != PK_READ && ph.len != 0) pa <= PA_DATA;
      end else begin
        pcnt <= pcnt - 1'b1;
        if (pcnt == 12'd1) pa <= PA_HEAD;
      end
    end
  end

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n,
    .in_valid(f1_valid && to_resp), .in_ready(f2_ready), .in_data(f1_data),
    .out_valid(hub_out_valid), .out_ready(hub_out_ready), .out_data(hub_out_data),
    .count(c2)
  );
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo3 (
    .clk, .rst_n,
    .in_valid(f1_valid && !to_resp), .in_ready(f3_ready), .in_data(f1_data),
    .out_valid(rreq_valid), .out_ready(rreq_ready), .out_data(rreq_data),
    .count(c3)
  );
endmodule
