// l1_buffer: the private activation buffer (L1) of one Flexible Tensor PE.
//
// DEPTH words of WIDTH bits, one activation vector per word. One write port
// (filled from the core's LLC through the interconnect) and one read port
// feeding the PE's activation vector register. The read is registered:
// rdata holds the word addressed in the previous cycle with re high.
// The design names the buffer; its size and ports are this
// implementation's choices (8 KB per PE).
module l1_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
