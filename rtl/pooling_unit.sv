// pooling_unit: pooling unit of the Flexible Neural Core.
//
// One step of max pooling: the lane-wise maximum of two vectors of LANES
// signed 8-bit elements. A k-element window is pooled in k-1 steps, the
// result of each step being one operand of the next. The design names the
// unit; max pooling by pairwise steps is this implementation's choice.
// Combinational.
module pooling_unit #(
  parameter int unsigned LANES = 8
) (
  input  logic [LANES*8-1:0] a,
  input  logic [LANES*8-1:0] b,
  output logic [LANES*8-1:0] y
);
  always_comb begin
    for (int i = 0; i < LANES; i++)
      y[i*8 +: 8] = ($signed(a[i*8 +: 8]) > $signed(b[i*8 +: 8])) ? a[i*8 +: 8] : b[i*8 +: 8];
  end
endmodule
