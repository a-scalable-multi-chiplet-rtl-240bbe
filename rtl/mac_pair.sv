// mac_pair: one dynamic bit-width MAC pair of the Flexible Tensor PE.
//
// The pair is built from eight 4x4 multipliers in two halves. Each half
// multiplies one activation byte by one weight byte as four nibble products
// (high/low activation nibble x high/low weight nibble); a data arbiter and
// shift adders then combine the nibble products according to the mode:
//   PREC_A8W8  : psum_a = A0*W0 + A1*W1          (act = {A1,A0}, wgt = {W1,W0})
//   PREC_A8W4  : psum_a = A0*W0 + A1*W2,         (wgt = {W2,W3,W0,W1} nibbles,
//                psum_b = A0*W1 + A1*W3           W0/W2 are the high nibbles)
//   PREC_A16W8 : psum_a = A0 * W0                (act = 16-bit A0, wgt[7:0] = W0)
// so all eight multipliers work in every mode. The structure (eight 4x4
// multipliers, the per-half shift adder and the final shift adder for the
// 16-bit mode) follows the design. All operands are two's-complement; each
// 4x4 multiplier is realised as a 5x5 signed multiply of nibbles that are
// sign- or zero-extended depending on their position, which is this
// implementation's way of handling signed operands. Which products of the
// two halves are added together is this implementation's choice.
// Purely combinational.
module mac_pair
  import accel_pkg::*;
(
  input  prec_e                     mode,
  input  logic [15:0]               act,
  input  logic [15:0]               wgt,
  output logic signed [PSUM_W-1:0]  psum_a,
  output logic signed [PSUM_W-1:0]  psum_b
);
  // operand nibbles per half: index 0 = left (A0 / A0-H), 1 = right (A1 / A0-L)
  logic [7:0] xa [2];
  logic [7:0] yw [2];
  logic       xh_s [2], xl_s [2], yh_s, yl_s;

  always_comb begin
    if (mode == PREC_A16W8) begin
      xa[0] = act[15:8];   // A0-H, signed
      xa[1] = act[7:0];    // A0-L, unsigned
      yw[0] = wgt[7:0];
      yw[1] = wgt[7:0];    // same weight on both halves
      xh_s[0] = 1'b1; xl_s[0] = 1'b0;
      xh_s[1] = 1'b0; xl_s[1] = 1'b0;
    end else begin
      xa[0] = act[7:0];
      xa[1] = act[15:8];
      yw[0] = wgt[7:0];
      yw[1] = wgt[15:8];
      xh_s[0] = 1'b1; xl_s[0] = 1'b0;
      xh_s[1] = 1'b1; xl_s[1] = 1'b0;
    end
    yh_s = 1'b1;
    yl_s = (mode == PREC_A8W4);  // a low nibble is a signed 4-bit weight
  end

  // eight 4x4 multipliers: p[h][0]=xh*yh p[h][1]=xh*yl p[h][2]=xl*yh p[h][3]=xl*yl
  logic signed [9:0] p [2][4];
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      logic signed [4:0] xh, xl, yh, yl;
      xh = {xh_s[h] & xa[h][7], xa[h][7:4]};
      xl = {xl_s[h] & xa[h][3], xa[h][3:0]};
      yh = {yh_s & yw[h][7], yw[h][7:4]};
      yl = {yl_s & yw[h][3], yw[h][3:0]};
      p[h][0] = xh * yh;
      p[h][1] = xh * yl;
      p[h][2] = xl * yh;
      p[h][3] = xl * yl;
    end
  end

  // data arbiter + shift adders: per half, byte x high nibble and byte x low
  // nibble; the first shift adder joins them into byte x byte, the second
  // joins the two halves into 16 x 8 bits
  logic signed [PSUM_W-1:0] hi4 [2];     // byte x high weight nibble
  logic signed [PSUM_W-1:0] lo4 [2];     // byte x low weight nibble
  logic signed [PSUM_W-1:0] full8 [2];   // byte x byte
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      hi4[h]   = (PSUM_W'(p[h][0]) <<< 4) + PSUM_W'(p[h][2]);
      lo4[h]   = (PSUM_W'(p[h][1]) <<< 4) + PSUM_W'(p[h][3]);
      full8[h] = (hi4[h] <<< 4) + lo4[h];
    end
    unique case (mode)
      PREC_A8W4: begin
        psum_a = hi4[0] + hi4[1];
        psum_b = lo4[0] + lo4[1];
      end
      PREC_A16W8: begin
        psum_a = (full8[0] <<< 8) + full8[1];
        psum_b = '0;
      end
      default: begin
        psum_a = full8[0] + full8[1];
        psum_b = '0;
      end
    endcase
  end
endmodule
