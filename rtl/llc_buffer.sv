// llc_buffer: the unified last-level buffer (LLC) of one Flexible Neural Core.
//
// DEPTH words of WIDTH bits holding input activations, layer results and
// vector-unit operands. Two independent ports: port A serves the core's
// host/DMA side, port B the instruction controller. Each port reads or
// writes one word per cycle; reads are registered (data one cycle after
// en). If both ports write the same word in one cycle, port B wins. The
// design names the buffer; size (256 KB) and ports are this
// implementation's choices.
module llc_buffer #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
