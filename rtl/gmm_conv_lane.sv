// gmm_conv_lane: one 3x3 convolution, purely combinational.
//
// Multiplies the nine unsigned 8-bit pixels of a 3x3 window by nine signed
// 8-bit coefficients, sums the products and saturates the sum to a signed
// 16-bit result. The window and coefficients are indexed in raster order
// (index 3*row + column, top-left first). The convolution core registers the
// result, so this lane adds no latency of its own. Four of these lanes make
// the four parallel convolutions of the GMM; the saturation to 16 bits is
// this design's choice.
module gmm_conv_lane
  import gmm_pkg::*;
(
  input  pix_t  [KTAPS-1:0] win,   // window pixels, raster order
  input  coef_t [KTAPS-1:0] coef,  // kernel coefficients, raster order
  output res_t              res    // saturated sum of products
);
  // 8-bit unsigned x 8-bit signed fits in 17 bits; nine of them in 21 bits.
  localparam int unsigned ACC_W = PIX_W + COEF_W + 5;
  localparam logic signed [ACC_W-1:0] RES_MAX = ACC_W'(2**(RES_W-1) - 1);
  localparam logic signed [ACC_W-1:0] RES_MIN = -ACC_W'(2**(RES_W-1));

  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int t = 0; t < KTAPS; t++)
      acc += ACC_W'($signed({1'b0, win[t]}) * coef[t]);
    if (acc > RES_MAX)      res = res_t'(RES_MAX);
    else if (acc < RES_MIN) res = res_t'(RES_MIN);
    else                    res = res_t'(acc);
  end
endmodule
