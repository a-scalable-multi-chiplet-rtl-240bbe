// side_chiplet: one SIDE chiplet: a die-to-die port and one Flexible
// Neural Core.
//
// Packets arriving over the link are executed on the core's host port by a
// packet endpoint (writes into LLC, weight buffer or control registers;
// reads answered with response packets sent back over the link). Lane
// signals are those of d2d_ctrl and connect to the HUB's port through the
// package. The composition follows the design; the endpoint is this
// implementation's.
module side_chiplet
  import accel_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  output logic         lane_tx_valid,
  output logic         lane_tx_first,
  output logic [15:0]  lane_tx_data,
  input  logic         lane_rx_valid,
  input  logic         lane_rx_first,
  input  logic [15:0]  lane_rx_data,
  output logic         credit_tx,
  input  logic         credit_rx,
  output logic         busy,
  output logic         stalled
);
  logic        rx_valid, rx_ready, tx_valid, tx_ready;
  logic [63:0] rx_data, tx_data;

  d2d_ctrl #(.LANES(2), .LANE_W(8), .FLIT_W(64), .RX_DEPTH(16)) u_d2d (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_data,
    .rx_valid, .rx_ready, .rx_data,
    .lane_tx_valid, .lane_tx_first, .lane_tx_data,
    .lane_rx_valid, .lane_rx_first, .lane_rx_data,
    .credit_tx, .credit_rx, .stalled
  );

  logic        mem_req, mem_we, mem_rvalid;
  logic [19:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;

  pkt_target u_tgt (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
  );

  fnc u_fnc (
    .clk, .rst_n,
    .host_req(mem_req), .host_we(mem_we), .host_addr(mem_addr), .host_wdata(mem_wdata),
    .host_rvalid(mem_rvalid), .host_rdata(mem_rdata), .busy
  );
endmodule
