// d2d_ctrl: die-to-die link controller (one port, both directions).
//
// Transmit: 64-bit flits from tx_* are cut into BEATS = 64/(LANES*LANE_W)
// beats and driven on LANES byte-wide lanes, one beat per cycle, with
// lane_tx_valid and lane_tx_first (first beat of a flit). A new flit is
// taken in the last beat of the previous one, so the link runs at full
// rate. Receive: beats on lane_rx_* are reassembled into flits and queued
// in an RX_DEPTH-entry receive FIFO read through rx_*.
// Flow control is credit based: the transmitter starts with RX_DEPTH
// credits (the depth of the far side's receive FIFO), spends one per flit
// and regains one for each cycle credit_rx is high; the receiver pulses
// credit_tx whenever a flit leaves its FIFO. With no credit left the
// transmitter stalls (tx_ready low), so the receive FIFO cannot overflow.
// Two lanes of 8 bits per direction follow the link's specification; the
// flit size, beat framing and credit scheme are this implementation's
// choices. The serialisation to 12 Gb/s per pin belongs to the PHY, which
// is not part of this RTL: the lanes here run at the core clock.
module d2d_ctrl #(
  parameter int unsigned LANES    = 2,
  parameter int unsigned LANE_W   = 8,
  parameter int unsigned FLIT_W   = 64,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // flit side
  input  logic                      tx_valid,
  output logic                      tx_ready,
  input  logic [FLIT_W-1:0]         tx_data,
  output logic                      rx_valid,
  input  logic                      rx_ready,
  output logic [FLIT_W-1:0]         rx_data,
  // lane side
  output logic                      lane_tx_valid,
  output logic                      lane_tx_first,
  output logic [LANES*LANE_W-1:0]   lane_tx_data,
  input  logic                      lane_rx_valid,
  input  logic                      lane_rx_first,
  input  logic [LANES*LANE_W-1:0]   lane_rx_data,
  output logic                      credit_tx,
  input  logic                      credit_rx,
  // status
  output logic                      stalled
);
  localparam int unsigned BW    = LANES * LANE_W;
  localparam int unsigned BEATS = FLIT_W / BW;
  localparam int unsigned CW    = $clog2(BEATS);

  // ---------------- transmit ----------------
  logic [FLIT_W-1:0]           tx_sreg;
  logic                        sending;
  logic [CW-1:0]               beat;
  logic [$clog2(RX_DEPTH):0]   credits;
  logic                        last_beat, take;

  assign last_beat = sending && (beat == CW'(BEATS - 1));
  assign tx_ready  = (credits != '0) && (!sending || last_beat);
  assign take      = tx_valid && tx_ready;
  assign stalled   = tx_valid && (credits == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sreg <= '0;
      sending <= 1'b0;
      beat    <= '0;
      credits <= ($clog2(RX_DEPTH)+1)'(RX_DEPTH);
    end else begin
      if (take) begin
        tx_sreg <= tx_data;
        sending <= 1'b1;
        beat    <= '0;
      end else if (last_beat) begin
        sending <= 1'b0;
      end else if (sending) begin
        beat <= beat + 1'b1;
      end
      credits <= credits - ($clog2(RX_DEPTH)+1)'(take) + ($clog2(RX_DEPTH)+1)'(credit_rx);
    end
  end

  assign lane_tx_valid = sending;
  assign lane_tx_first = sending && (beat == '0);
  assign lane_tx_data  = tx_sreg[beat*BW +: BW];

  // ---------------- receive ----------------
  logic [FLIT_W-1:0] rx_sreg;
  logic [CW-1:0]     rbeat;
  logic              rx_push, fifo_ready;
  logic [FLIT_W-1:0] rx_flit;

  always_comb begin
    rx_flit = rx_sreg;
    rx_flit[FLIT_W-BW +: BW] = lane_rx_data;
  end
  assign rx_push = lane_rx_valid && (lane_rx_first ? (BEATS == 1) : (rbeat == CW'(BEATS - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sreg <= '0;
      rbeat   <= '0;
    end else if (lane_rx_valid) begin
      rx_sreg[(lane_rx_first ? 0 : int'(rbeat)) * BW +: BW] <= lane_rx_data;
      rbeat <= lane_rx_first ? CW'(1) : rbeat + 1'b1;
    end
  end

  logic [$clog2(RX_DEPTH):0] rx_count;
  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n,
    .in_valid(rx_push), .in_ready(fifo_ready), .in_data(rx_flit),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data),
    .count(rx_count)
  );
  assign credit_tx = rx_valid && rx_ready;

  a_rx_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) rx_push |-> fifo_ready);
endmodule
