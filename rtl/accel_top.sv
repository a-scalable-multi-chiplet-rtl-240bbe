// accel_top: the seven-chiplet deep learning accelerator.
//
// One HUB chiplet (four Flexible Neural Cores, six chiplet router units
// with die-to-die ports) and six SIDE chiplets (one core each), ten cores
// in all. Each HUB port is wired to one SIDE chiplet's port, standing in
// for the redistribution-layer wiring of the 2.5D package (the die-to-die
// PHYs are not part of this RTL, so the lanes connect directly).
// The host stream carries packets (accel_pkg::head_t) addressed to cores
// 0..3 (HUB) and 4..9 (SIDE chiplets 0..5); it stands in for the HUB's PCIe
// endpoint, RISC-V controller and DMA. Requests from SIDE chiplets for HUB
// memory leave on rreq_*.
module accel_top
  import accel_pkg::*;
#(
  parameter int unsigned N_SIDE = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_in_valid,
  output logic               host_in_ready,
  input  logic [63:0]        host_in_data,
  output logic               host_out_valid,
  input  logic               host_out_ready,
  output logic [63:0]        host_out_data,
  input  logic [N_SIDE-1:0]  psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [3:0]         paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  output logic [N_SIDE-1:0]  rreq_valid,
  input  logic [N_SIDE-1:0]  rreq_ready,
  output logic [63:0]        rreq_data [N_SIDE],
  output logic [3+N_SIDE:0]  core_busy,
  output logic [N_SIDE-1:0]  hub_link_stalled,
  output logic [N_SIDE-1:0]  side_link_stalled,
  output logic               conflict
);
  logic [N_SIDE-1:0] h_tx_valid, h_tx_first, s_tx_valid, s_tx_first;
  logic [15:0]       h_tx_data [N_SIDE];
  logic [15:0]       s_tx_data [N_SIDE];
  logic [N_SIDE-1:0] h_credit, s_credit;

  hub_chiplet #(.N_CORE(4), .N_PORT(N_SIDE)) u_hub (
    .clk, .rst_n,
    .host_in_valid, .host_in_ready, .host_in_data,
    .host_out_valid, .host_out_ready, .host_out_data,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .rreq_valid, .rreq_ready, .rreq_data,
    .lane_tx_valid(h_tx_valid), .lane_tx_first(h_tx_first), .lane_tx_data(h_tx_data),
    .lane_rx_valid(s_tx_valid), .lane_rx_first(s_tx_first), .lane_rx_data(s_tx_data),
    .credit_tx(h_credit), .credit_rx(s_credit),
    .core_busy(core_busy[3:0]), .link_stalled(hub_link_stalled), .conflict
  );

  for (genvar s = 0; s < N_SIDE; s++) begin : g_side
    side_chiplet u_side (
      .clk, .rst_n,
      .lane_tx_valid(s_tx_valid[s]), .lane_tx_first(s_tx_first[s]), .lane_tx_data(s_tx_data[s]),
      .lane_rx_valid(h_tx_valid[s]), .lane_rx_first(h_tx_first[s]), .lane_rx_data(h_tx_data[s]),
      .credit_tx(s_credit[s]), .credit_rx(h_credit[s]),
      .busy(core_busy[4+s]), .stalled(side_link_stalled[s])
    );
  end
endmodule
