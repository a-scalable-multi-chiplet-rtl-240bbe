// hub_chiplet: the HUB chiplet: four Flexible Neural Cores, six chiplet
// router units each with its die-to-die port, and the packet router.
//
// The host stream (standing in for the PCIe endpoint, the RISC-V
// controller and the DMA, which are not part of this RTL) carries packets
// that the router sends to a local core (targets 0..3, executed by a
// packet endpoint on the core's host port) or to a CLRU and die-to-die
// port (targets 4..9 for SIDE chiplets 0..5). Responses come back merged
// on host_out_*. Requests a SIDE chiplet sends towards the HUB leave each
// CLRU on rreq_* for the HUB's system memory. The CLRUs' configuration
// registers share one APB bus, psel[i] selecting CLRU i.
module hub_chiplet
  import accel_pkg::*;
#(
  parameter int unsigned N_CORE = 4,
  parameter int unsigned N_PORT = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  // host
  input  logic               host_in_valid,
  output logic               host_in_ready,
  input  logic [63:0]        host_in_data,
  output logic               host_out_valid,
  input  logic               host_out_ready,
  output logic [63:0]        host_out_data,
  // APB to the CLRUs
  input  logic [N_PORT-1:0]  psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [3:0]         paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  // remote requests for HUB memory
  output logic [N_PORT-1:0]  rreq_valid,
  input  logic [N_PORT-1:0]  rreq_ready,
  output logic [63:0]        rreq_data [N_PORT],
  // die-to-die lanes
  output logic [N_PORT-1:0]  lane_tx_valid,
  output logic [N_PORT-1:0]  lane_tx_first,
  output logic [15:0]        lane_tx_data [N_PORT],
  input  logic [N_PORT-1:0]  lane_rx_valid,
  input  logic [N_PORT-1:0]  lane_rx_first,
  input  logic [15:0]        lane_rx_data [N_PORT],
  output logic [N_PORT-1:0]  credit_tx,
  input  logic [N_PORT-1:0]  credit_rx,
  // status
  output logic [N_CORE-1:0]  core_busy,
  output logic [N_PORT-1:0]  link_stalled,
  output logic               conflict
);
  localparam int unsigned NT = N_CORE + N_PORT;

  logic [NT-1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  logic [63:0]   req_data;
  logic [63:0]   rsp_data [NT];

  hub_router #(.NT(NT)) u_router (
    .clk, .rst_n,
    .host_in_valid, .host_in_ready, .host_in_data,
    .host_out_valid, .host_out_ready, .host_out_data,
    .req_valid, .req_ready, .req_data,
    .rsp_valid, .rsp_ready, .rsp_data, .conflict
  );

  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    logic        mem_req, mem_we, mem_rvalid;
    logic [19:0] mem_addr;
    logic [63:0] mem_wdata, mem_rdata;
    pkt_target u_tgt (
      .clk, .rst_n,
      .in_valid(req_valid[c]), .in_ready(req_ready[c]), .in_data(req_data),
      .out_valid(rsp_valid[c]), .out_ready(rsp_ready[c]), .out_data(rsp_data[c]),
      .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
    );
    fnc u_fnc (
      .clk, .rst_n,
      .host_req(mem_req), .host_we(mem_we), .host_addr(mem_addr), .host_wdata(mem_wdata),
      .host_rvalid(mem_rvalid), .host_rdata(mem_rdata), .busy(core_busy[c])
    );
  end

  logic [31:0] prdata_i [N_PORT];
  logic [N_PORT-1:0] pready_i;

  for (genvar p = 0; p < N_PORT; p++) begin : g_port
    logic        o_valid, o_ready, i_valid, i_ready;
    logic [63:0] o_data, i_data;
    clru #(.FIFO_DEPTH(16)) u_clru (
      .clk, .rst_n,
      .psel(psel[p]), .penable, .pwrite, .paddr, .pwdata,
      .prdata(prdata_i[p]), .pready(pready_i[p]),
      .hub_in_valid(req_valid[N_CORE+p]), .hub_in_ready(req_ready[N_CORE+p]), .hub_in_data(req_data),
      .hub_out_valid(rsp_valid[N_CORE+p]), .hub_out_ready(rsp_ready[N_CORE+p]),
      .hub_out_data(rsp_data[N_CORE+p]),
      .rreq_valid(rreq_valid[p]), .rreq_ready(rreq_ready[p]), .rreq_data(rreq_data[p]),
      .d2d_out_valid(o_valid), .d2d_out_ready(o_ready), .d2d_out_data(o_data),
      .d2d_in_valid(i_valid), .d2d_in_ready(i_ready), .d2d_in_data(i_data)
    );
    d2d_ctrl #(.LANES(2), .LANE_W(8), .FLIT_W(64), .RX_DEPTH(16)) u_d2d (
      .clk, .rst_n,
      .tx_valid(o_valid), .tx_ready(o_ready), .tx_data(o_data),
      .rx_valid(i_valid), .rx_ready(i_ready), .rx_data(i_data),
      .lane_tx_valid(lane_tx_valid[p]), .lane_tx_first(lane_tx_first[p]),
      .lane_tx_data(lane_tx_data[p]),
      .lane_rx_valid(lane_rx_valid[p]), .lane_rx_first(lane_rx_first[p]),
      .lane_rx_data(lane_rx_data[p]),
      .credit_tx(credit_tx[p]), .credit_rx(credit_rx[p]), .stalled(link_stalled[p])
    );
  end

  always_comb begin
    prdata = '0;
    pready = 1'b1;
    for (int p = 0; p < N_PORT; p++)
      if (psel[p]) begin
        prdata = prdata_i[p];
        pready = pready_i[p];
      end
  end
endmodule
