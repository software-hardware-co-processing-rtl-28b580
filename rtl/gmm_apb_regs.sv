// gmm_apb_regs: APB register file of the GMM.
//
// An APB completer with no wait states (pready is always high). Writes take
// effect in the access phase (psel and penable high). The map, in byte
// offsets, is: 0x04 STATUS (read-only: [0] busy, [1] done, [2] err),
// 0x08 SRC input address, 0x0C DST output address, 0x10 WIDTH in pixels,
// 0x14 HEIGHT in rows, 0x18 CYCLES of the last job (read-only), and
// 0x20 + 4k COEFk for k = 0..8, the 3x3 kernel in raster order as signed
// 8-bit values. An access to any other offset, or a write to a read-only
// register, completes with pslverr. Reset clears every register.
// Passing the input and output addresses and the convolution coefficients
// through APB follows the design description; the map is this design's own.
module gmm_apb_regs
  import gmm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output gmm_cfg_t    cfg,
  input  logic        st_busy,
  input  logic        st_done,
  input  logic        st_err,
  input  logic [31:0] st_cycles
);
  logic access, is_coef, known, read_only;
  logic [3:0] coef_idx;

  assign access    = psel && penable;
  assign coef_idx  = 4'((paddr - REG_COEF0) >> 2);
  assign is_coef   = (paddr >= REG_COEF0) && (paddr < REG_COEF0 + 8'(4*KTAPS)) && (paddr[1:0] == 2'b00);
  assign read_only = (paddr == REG_STATUS) || (paddr == REG_CYCLES);
  assign known     = is_coef || read_only || (paddr == REG_SRC) || (paddr == REG_DST) ||
                     (paddr == REG_WIDTH) || (paddr == REG_HEIGHT);
  assign pready    = 1'b1;
  assign pslverr   = access && (!known || (pwrite && read_only));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (access && pwrite && known && !read_only) begin
      if (is_coef) cfg.coef[coef_idx] <= coef_t'(pwdata[COEF_W-1:0]);
      else unique case (paddr)
        REG_SRC:    cfg.src_addr <= pwdata;
        REG_DST:    cfg.dst_addr <= pwdata;
        REG_WIDTH:  cfg.width    <= pwdata[DIM_W-1:0];
        REG_HEIGHT: cfg.height   <= pwdata[DIM_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    prdata = '0;
    if (is_coef) prdata = 32'($signed(cfg.coef[coef_idx]));
    else unique case (paddr)
      REG_STATUS: prdata = {29'd0, st_err, st_done, st_busy};
      REG_SRC:    prdata = cfg.src_addr;
      REG_DST:    prdata = cfg.dst_addr;
      REG_WIDTH:  prdata = 32'(cfg.width);
      REG_HEIGHT: prdata = 32'(cfg.height);
      REG_CYCLES: prdata = st_cycles;
      default:    prdata = '0;
    endcase
  end

  // APB: penable only in the second cycle of a transfer
  assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel);
  assert property (@(posedge clk) disable iff (!rst_n) psel && !penable |=> psel && penable);
endmodule
