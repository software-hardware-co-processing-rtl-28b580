// gmm_top: the Generic Matrix Multiplier (GMM), a 3x3 convolution coprocessor.
//
// The processor writes the input and output addresses, the image size and
// the nine kernel coefficients over APB, then raises gpio_m. The GMM reads
// the 8-bit image from memory (four pixels per 32-bit word), convolves it
// with four lanes working on four neighbouring pixels at once, writes the
// signed 16-bit result image (four results per 64-bit word) back to memory,
// and raises gpio_f once the last write has been answered. Lowering gpio_m
// clears gpio_f. For Sobel edge detection it runs twice, once with the
// horizontal and once with the vertical gradient kernel.
//
// Blocks: gmm_apb_regs (configuration), gmm_ctrl (GPIO handshake and job
// sequencing), gmm_rd_master -> gmm_conv_core -> gmm_wr_master (datapath).
// Memory ports are simple valid/ready channels with in-order read data and a
// write response pulse; the fabric interconnect would bridge them to the
// processor subsystem's bus. With memory that keeps up, one frame of
// W x H pixels takes about (W/4 + 1) * (H + 1) cycles plus a few cycles of
// pipeline and response latency. gpio_m may be asynchronous to clk.
// The split into APB configuration, GPIO control and memory data transfer
// follows the design description; everything inside is this design's own.
module gmm_top
  import gmm_pkg::*;
#(
  parameter int unsigned MAX_WIDTH     = 1280,  // widest image (pixels)
  parameter int unsigned RD_FIFO_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // APB configuration port
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [7:0]            paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // GPIO handshake
  input  logic                  gpio_m,
  output logic                  gpio_f,
  // memory read channel
  output logic                  rd_req_valid,
  input  logic                  rd_req_ready,
  output logic [ADDR_W-1:0]     rd_req_addr,
  input  logic                  rd_resp_valid,
  input  logic [IN_WORD_W-1:0]  rd_resp_data,
  // memory write channel
  output logic                  wr_req_valid,
  input  logic                  wr_req_ready,
  output logic [ADDR_W-1:0]     wr_req_addr,
  output logic [OUT_WORD_W-1:0] wr_req_data,
  input  logic                  wr_resp_valid
);
  gmm_cfg_t cfg_regs, cfg;
  logic job_start, st_busy, st_done, st_err;
  logic [31:0] st_cycles;
  logic [DIM_W-1:0]   ww;
  logic [2*DIM_W-1:0] nwords;

  logic                  rd_busy, rd_done, core_busy, core_done, wr_busy, wr_done;
  logic                  s_valid, s_ready;
  logic [IN_WORD_W-1:0]  s_data;
  logic                  r_valid, r_ready;
  logic [OUT_WORD_W-1:0] r_data;

  assign ww     = cfg.width >> 2;
  assign nwords = ww * cfg.height;

  gmm_apb_regs u_regs (
    .clk(clk), .rst_n(rst_n),
    .psel(psel), .penable(penable), .pwrite(pwrite), .paddr(paddr), .pwdata(pwdata),
    .prdata(prdata), .pready(pready), .pslverr(pslverr),
    .cfg(cfg_regs),
    .st_busy(st_busy), .st_done(st_done), .st_err(st_err), .st_cycles(st_cycles)
  );

  gmm_ctrl #(.MAX_WIDTH(MAX_WIDTH)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .gpio_m(gpio_m), .gpio_f(gpio_f),
    .cfg_in(cfg_regs), .cfg(cfg),
    .job_start(job_start), .job_done(wr_done),
    .busy(st_busy), .done(st_done), .err(st_err), .cycles(st_cycles)
  );

  gmm_rd_master #(.FIFO_DEPTH(RD_FIFO_DEPTH)) u_rd (
    .clk(clk), .rst_n(rst_n),
    .start(job_start), .src(cfg.src_addr), .nwords(nwords),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_resp_valid(rd_resp_valid), .rd_resp_data(rd_resp_data),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data),
    .busy(rd_busy), .done(rd_done)
  );

  gmm_conv_core #(.MAX_WIDTH(MAX_WIDTH)) u_core (
    .clk(clk), .rst_n(rst_n),
    .start(job_start), .cfg_ww(ww), .cfg_h(cfg.height), .coef(cfg.coef),
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data),
    .busy(core_busy), .done(core_done)
  );

  gmm_wr_master u_wr (
    .clk(clk), .rst_n(rst_n),
    .start(job_start), .dst(cfg.dst_addr), .nwords(nwords),
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready),
    .wr_req_addr(wr_req_addr), .wr_req_data(wr_req_data),
    .wr_resp_valid(wr_resp_valid),
    .busy(wr_busy), .done(wr_done)
  );

  // the three datapath blocks start together; reader and core end before the writer
  assert property (@(posedge clk) disable iff (!rst_n) rd_done |-> wr_busy);
  assert property (@(posedge clk) disable iff (!rst_n) core_done |-> wr_busy);
  assert property (@(posedge clk) disable iff (!rst_n) wr_done |-> !rd_busy);
  assert property (@(posedge clk) disable iff (!rst_n) job_start |-> !rd_busy && !core_busy && !wr_busy);
endmodule
