// scaling_unit: scaling unit of the Flexible Neural Core.
//
// Rescales a vector of LANES signed 8-bit elements: y = sat8((a * mult +
// round) >>> shift), with mult a signed 8-bit factor, round-half-up when
// shift > 0, and saturation to [-128, 127]. Used to requantise tensors
// between layers. The design names the unit; the operation is this
// implementation's choice. Combinational.
module scaling_unit #(
  parameter int unsigned LANES = 8
) (
  input  logic [LANES*8-1:0] a,
  input  logic [7:0]         mult,
  input  logic [3:0]         shift,
  output logic [LANES*8-1:0] y
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic signed [16:0] p;
      p = 17'($signed(a[i*8 +: 8]) * $signed(mult));
      if (shift != 0) p = (p + (17'sd1 <<< (shift - 1))) >>> shift;
      if (p > 17'sd127)       y[i*8 +: 8] = 8'h7f;
      else if (p < -17'sd128) y[i*8 +: 8] = 8'h80;
      else                    y[i*8 +: 8] = p[7:0];
    end
  end
endmodule
