// weight_buffer: the configurable weight buffer of one Flexible Neural Core.
//
// BANKS banks of SUBBANKS sub-banks; sub-bank s of every bank feeds MAC
// column s, so one bank row is the weight set of a whole PE array
// (SUBBANKS x SUB_W bits). The buffer is configured by `mode`:
//   WB_UMA  : bank i feeds PE i                     (group of 1)
//   WB_DUAL : banks 2g,2g+1 merged, shared by 2 PEs (group of 2)
//   WB_QUAD : banks 4g..4g+3 merged, shared by 4 PEs
//   WB_FULL : all banks merged, shared by all 8 PEs
// A group of G PEs sees its G banks as one space of G*ROWS rows: the row
// address's upper bits pick the bank inside the group. All groups read the
// same row address in the same cycle, each from its own banks, so groups
// receive different weights (different output-channel chunks) and the PEs
// of a group the same weights. The four modes follow the design; sizes,
// the address split and the single shared read address are this
// implementation's choices.
//
// Timing: read data appears in rdata one cycle after re. Writes come one
// sub-bank word at a time from the host side.
module weight_buffer
  import accel_pkg::*;
#(
  parameter int unsigned BANKS    = 8,
  parameter int unsigned SUBBANKS = 16,
  parameter int unsigned ROWS     = 128,
  parameter int unsigned SUB_W    = 64,
  localparam int unsigned RA_W    = $clog2(BANKS * ROWS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  wb_mode_e                     mode,
  // host write port
  input  logic                         we,
  input  logic [$clog2(BANKS)-1:0]     wbank,
  input  logic [$clog2(ROWS)-1:0]      wrow,
  input  logic [$clog2(SUBBANKS)-1:0]  wsub,
  input  logic [SUB_W-1:0]             wdata,
  // read port shared by all groups
  input  logic                         re,
  input  logic [RA_W-1:0]              raddr,
  output logic [SUBBANKS*SUB_W-1:0]    rdata [BANKS]
);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned BW = $clog2(BANKS);

  logic [SUB_W-1:0] mem [BANKS][SUBBANKS][ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][wsub][wrow] <= wdata;
  end

  // every bank reads the row; the group decides afterwards whose data it takes
  logic [SUBBANKS*SUB_W-1:0] bank_q [BANKS];
  always_ff @(posedge clk) begin
    if (re)
      for (int b = 0; b < BANKS; b++)
        for (int s = 0; s < SUBBANKS; s++)
          bank_q[b][s*SUB_W +: SUB_W] <= mem[b][s][raddr[RW-1:0]];
  end

  logic [BW-1:0] sel_q;     // bank offset inside the group, from the address
  wb_mode_e      mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= '0;
      mode_q <= WB_UMA;
    end else if (re) begin
      sel_q  <= BW'(raddr >> RW);
      mode_q <= mode;
    end
  end

  // PE p of a group of size 2^lg reads bank (p with its low lg bits replaced
  // by the in-group bank offset)
  always_comb begin
    for (int p = 0; p < BANKS; p++) begin
      logic [BW-1:0] gmask, bsel;
      gmask = BW'((1 << int'(mode_q)) - 1);
      if (int'(mode_q) > BW) gmask = '1;
      bsel = (BW'(p) & ~gmask) | (sel_q & gmask);
      rdata[p] = bank_q[bsel];
    end
  end
endmodule
