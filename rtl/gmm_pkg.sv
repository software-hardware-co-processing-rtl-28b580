// gmm_pkg: types and constants shared by the Generic Matrix Multiplier (GMM).
//
// The GMM is a fabric coprocessor that performs 3x3 2D convolution of an
// 8-bit single-plane image, four output pixels at a time. This package holds
// the pixel, coefficient and result widths, the APB register map, and the
// configuration record that the register file hands to the datapath.
// The four parallel convolutions and the APB/GPIO control scheme follow the
// design description; all widths and the register map are this design's
// own choices.
package gmm_pkg;

  localparam int unsigned PIX_W   = 8;   // unsigned input pixel
  localparam int unsigned COEF_W  = 8;   // signed kernel coefficient
  localparam int unsigned RES_W   = 16;  // signed, saturated output
  localparam int unsigned KTAPS   = 9;   // 3x3 kernel
  localparam int unsigned LANES   = 4;   // convolutions computed in parallel
  localparam int unsigned IN_WORD_W  = LANES * PIX_W;  // 32-bit read word
  localparam int unsigned OUT_WORD_W = LANES * RES_W;  // 64-bit write word
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DIM_W   = 12;  // image width/height field (up to 4095)

  // APB register map (byte offsets)
  localparam logic [7:0] REG_STATUS  = 8'h04;  // [0] busy, [1] done, [2] cfg error
  localparam logic [7:0] REG_SRC     = 8'h08;  // input image byte address
  localparam logic [7:0] REG_DST     = 8'h0C;  // output image byte address
  localparam logic [7:0] REG_WIDTH   = 8'h10;  // image width in pixels (multiple of 4)
  localparam logic [7:0] REG_HEIGHT  = 8'h14;  // image height in rows
  localparam logic [7:0] REG_CYCLES  = 8'h18;  // cycles taken by the last job (RO)
  localparam logic [7:0] REG_COEF0   = 8'h20;  // COEFk at 0x20 + 4k, k = 0..8, raster order

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [RES_W-1:0]  res_t;

  typedef struct packed {
    logic [ADDR_W-1:0] src_addr;
    logic [ADDR_W-1:0] dst_addr;
    logic [DIM_W-1:0]  width;     // pixels
    logic [DIM_W-1:0]  height;    // rows
    coef_t [KTAPS-1:0] coef;      // coef[3*r + c], r = row (top first), c = column (left first)
  } gmm_cfg_t;

endpackage
