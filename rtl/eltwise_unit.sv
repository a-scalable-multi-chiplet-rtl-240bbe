// eltwise_unit: element-wise unit of the Flexible Neural Core.
//
// Adds two vectors of LANES signed 8-bit elements lane by lane with
// saturation to [-128, 127] (for residual connections). The design names
// the unit; the operation is this implementation's choice. Combinational.
module eltwise_unit #(
  parameter int unsigned LANES = 8
) (
  input  logic [LANES*8-1:0] a,
  input  logic [LANES*8-1:0] b,
  output logic [LANES*8-1:0] y
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic signed [8:0] s;
      s = 9'($signed(a[i*8 +: 8])) + 9'($signed(b[i*8 +: 8]));
      if (s > 9'sd127)       y[i*8 +: 8] = 8'h7f;
      else if (s < -9'sd128) y[i*8 +: 8] = 8'h80;
      else                   y[i*8 +: 8] = s[7:0];
    end
  end
endmodule
