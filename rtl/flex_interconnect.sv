// flex_interconnect: the configurable fabric between the LLC and the PEs.
//
// Scatter: one LLC word per cycle is multicast into the L1 buffers of every
// PE whose bit is set in sc_mask. With different masks the same fabric
// gives each PE its own activation tile (8-tile mode), gives a group of PEs
// a shared tile (4-tile, 2-tile) or gives all PEs the same tile (1-tile
// mode, each PE then computes other output channels from its own weights).
// The scatter path is registered: l1_we/l1_waddr/l1_wdata follow sc_valid
// by one cycle.
// Gather: the controller names a PE and a result word; the word is
// selected from that PE's post-processed results for writing back to the
// LLC (combinational).
// The design states what the fabric is for; this structure is this
// implementation's choice.
module flex_interconnect #(
  parameter int unsigned NPE    = 8,
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned AW     = 10,
  parameter int unsigned OWORDS = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // scatter
  input  logic                       sc_valid,
  input  logic [NPE-1:0]             sc_mask,
  input  logic [AW-1:0]              sc_addr,
  input  logic [WIDTH-1:0]           sc_data,
  output logic [NPE-1:0]             l1_we,
  output logic [AW-1:0]              l1_waddr,
  output logic [WIDTH-1:0]           l1_wdata,
  // gather
  input  logic [$clog2(NPE)-1:0]     g_pe,
  input  logic [$clog2(OWORDS)-1:0]  g_word,
  input  logic [OWORDS*WIDTH-1:0]    pe_out [NPE],
  output logic [WIDTH-1:0]           g_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_we    <= '0;
      l1_waddr <= '0;
      l1_wdata <= '0;
    end else begin
      l1_we    <= sc_valid ? sc_mask : '0;
      l1_waddr <= sc_addr;
      l1_wdata <= sc_data;
    end
  end

  assign g_data = pe_out[g_pe][g_word*WIDTH +: WIDTH];
endmodule
