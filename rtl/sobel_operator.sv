// sobel_operator: Sobel window operator with the |Gx| + |Gy| magnitude approximation.
//
// Combinational. From the 3x3 window p0..p8 (column by column, p4 the centre) it forms
//   Gx = (p2 - p0) + 2*(p5 - p3) + (p8 - p6)     bottom row minus top row
//   Gy = (p0 - p6) + 2*(p1 - p7) + (p2 - p8)     left column minus right column
// as 11-bit two's-complement numbers (range -1020..1020), takes their absolute values by
// inverting and adding one when the sign bit (bit 10) is set, adds them into an 11-bit sum
// (at most 2040) and clamps it: when any of sum bits 10..8 is set the output is 255,
// otherwise it is sum[7:0]. The formulas, the 11-bit widths, the sign-bit absolute value
// and the clamp follow the source design exactly; gx and gy are brought out for
// inspection.
module sobel_operator
  import sobel_pkg::*;
(
  input  window_t win,
  output grad_t   gx,
  output grad_t   gy,
  output pixel_t  mag
);

  grad_t              p [9];
  logic [GRAD_W-1:0]  abs_gx, abs_gy, sum;

  always_comb begin
    for (int k = 0; k < 9; k++) p[k] = grad_t'({3'b000, win[k]});

    gx = (p[2] - p[0]) + ((p[5] - p[3]) <<< 1) + (p[8] - p[6]);
    gy = (p[0] - p[6]) + ((p[1] - p[7]) <<< 1) + (p[2] - p[8]);

    abs_gx = gx[GRAD_W-1] ? (~gx + 1'b1) : gx;
    abs_gy = gy[GRAD_W-1] ? (~gy + 1'b1) : gy;
    sum    = abs_gx + abs_gy;

    mag = (|sum[GRAD_W-1:PIX_W]) ? 8'hFF : sum[PIX_W-1:0];
  end

endmodule
