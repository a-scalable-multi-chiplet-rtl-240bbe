// hub_router: packet router of the HUB chiplet.
//
// Request side: packets from the host stream (host_in_*) are sent whole to
// the target named in their head: targets 0..3 are the HUB's own cores,
// 4..9 the six die-to-die ports (one per SIDE chiplet). A PK_WRITE packet
// is the head and len data flits, the other kinds the head only. Packets
// for a target >= NT are consumed and dropped.
// Response side: the response streams of all targets are merged into
// host_out_* packet by packet: a round-robin arbiter picks a stream that
// holds a head, then passes that packet whole (head and len data flits of
// a PK_RESP) before choosing again. conflict pulses when more than one
// stream was waiting at a choice.
// The HUB's routing function follows the design's block diagram; the
// packet-level routing and round-robin merge are this implementation's
// choices.
module hub_router
  import accel_pkg::*;
#(
  parameter int unsigned NT = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_in_valid,
  output logic          host_in_ready,
  input  logic [63:0]   host_in_data,
  output logic          host_out_valid,
  input  logic          host_out_ready,
  output logic [63:0]   host_out_data,
  output logic [NT-1:0] req_valid,
  input  logic [NT-1:0] req_ready,
  output logic [63:0]   req_data,
  input  logic [NT-1:0] rsp_valid,
  output logic [NT-1:0] rsp_ready,
  input  logic [63:0]   rsp_data [NT],
  output logic          conflict
);
  localparam int unsigned TW = $clog2(NT);

  // ---------------- request demux ----------------
  head_t       ih;
  logic        rq_data_phase;
  logic [3:0]  rq_tgt;
  logic [11:0] rq_cnt;
  logic [3:0]  cur_tgt;
  assign ih      = head_t'(host_in_data);
  assign cur_tgt = rq_data_phase ? rq_tgt : ih.target;
  assign req_data = host_in_data;

  always_comb begin
    req_valid = '0;
    if (int'(cur_tgt) < NT) begin
      req_valid[TW'(cur_tgt)] = host_in_valid;
      host_in_ready = req_ready[TW'(cur_tgt)];
    end else begin
      host_in_ready = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_data_phase <= 1'b0;
      rq_tgt        <= '0;
      rq_cnt        <= '0;
    end else if (host_in_valid && host_in_ready) begin
      if (!rq_data_phase) begin
        rq_tgt <= ih.target;
        rq_cnt <= ih.len;
        if (ih.kind == PK_WRITE && ih.len != 0) rq_data_phase <= 1'b1;
      end else begin
        rq_cnt <= rq_cnt - 1'b1;
        if (rq_cnt == 12'd1) rq_data_phase <= 1'b0;
      end
    end
  end

  // ---------------- response merge ----------------
  logic          locked;
  logic [TW-1:0] grant, rr;
  logic [11:0]   rs_cnt;
  logic [TW-1:0] pick;
  logic          any;

  always_comb begin
    pick = rr;
    any  = 1'b0;
    for (int i = NT - 1; i >= 0; i--) begin
      int j;
      j = (int'(rr) + i) % NT;
      if (rsp_valid[j]) begin
        pick = TW'(j);
        any  = 1'b1;
      end
    end
  end

  logic [TW-1:0] sel;
  assign sel            = locked ? grant : pick;
  assign host_out_valid = locked ? rsp_valid[grant] : any;
  assign host_out_data  = rsp_data[sel];
  always_comb begin
    rsp_ready = '0;
    rsp_ready[sel] = host_out_ready && (locked || any);
  end

  head_t oh;
  assign oh = head_t'(rsp_data[sel]);
  assign conflict = !locked && ($countones(rsp_valid) > 1) && host_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      grant  <= '0;
      rr     <= '0;
      rs_cnt <= '0;
    end else if (host_out_valid && host_out_ready) begin
      if (!locked) begin
        rr <= (int'(pick) == NT - 1) ? '0 : pick + 1'b1;
        if (oh.kind != PK_READ && oh.len != 0) begin
          locked <= 1'b1;
          grant  <= pick;
          rs_cnt <= oh.len;
        end
      end else begin
        rs_cnt <= rs_cnt - 1'b1;
        if (rs_cnt == 12'd1) locked <= 1'b0;
      end
    end
  end
endmodule
