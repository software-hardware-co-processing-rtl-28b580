// gmm_conv_core: streaming 3x3 convolution engine, four output pixels per cycle.
//
// The input is the image in raster order as 32-bit words of four 8-bit
// pixels (pixel 0 in bits 7:0). The output is the same-sized image as 64-bit
// words of four signed 16-bit results (result 0 in bits 15:0), also in raster
// order. Pixels outside the image count as zero.
//
// How it works: a position counter walks a grid of (WW+1) x (H+1) words,
// WW = width/4. Positions in the extra column and row are padding: the core
// makes them zero without taking an input word. Each word taken reads the
// column stored at its x in the line buffer ({row y-1, row y-2}), writes back
// {row y, row y-1}, and shifts a three-word column history. The history
// (three rows by twelve pixels) holds every window needed for the four
// output pixels of row y-1, word x-1, which the four lanes compute. Rows
// above the image are masked on the read, so the line buffer needs no reset.
//
// Timing: three pipeline stages (take input / read line buffer, shift the
// window, register the lane results). With in_valid and out_ready held high
// it takes one grid position per cycle and raises done (WW+1)*(H+1) cycles
// plus a few cycles of pipeline latency after start. A low out_ready stalls
// the whole pipeline. done pulses once, after the last output word is taken. cfg_ww and cfg_h must stay steady while busy.
// The four lanes follow the description of four parallel 2D convolutions;
// applying them to four neighbouring pixels of one kernel, and zero padding,
// are this design's choices.
module gmm_conv_core
  import gmm_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1280  // largest image width in pixels
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,     // pulse: begin a frame
  input  logic [DIM_W-1:0]      cfg_ww,    // width in 4-pixel words, >= 1
  input  logic [DIM_W-1:0]      cfg_h,     // height in rows, >= 1
  input  coef_t [KTAPS-1:0]     coef,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [IN_WORD_W-1:0]  in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [OUT_WORD_W-1:0] out_data,
  output logic                  busy,
  output logic                  done
);
  localparam int unsigned DEPTH = MAX_WIDTH / LANES + 1;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef logic [IN_WORD_W-1:0] word_t;
  typedef struct packed { word_t top; word_t mid; word_t bot; } col_t;

  // stage 0: position counter
  logic             active;
  logic [DIM_W-1:0] x, y;
  logic             pad, take, last_pos, adv;

  // stage 1
  logic             s1_valid, s1_emit, s1_y_ge1, s1_y_ge2;
  logic [DIM_W-1:0] s1_x;
  word_t            s1_word;
  logic [2*IN_WORD_W-1:0] lb_rdata;

  // stage 2: column history
  col_t             c0, c1, c2;
  logic             s2_valid;

  assign adv      = !out_valid || out_ready;
  assign pad      = (x == cfg_ww) || (y == cfg_h);
  assign take     = active && adv && (pad || in_valid);
  assign in_ready = active && adv && !pad;
  assign last_pos = (x == cfg_ww) && (y == cfg_h);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      x      <= '0;
      y      <= '0;
    end else if (start && !busy) begin
      active <= 1'b1;
      x      <= '0;
      y      <= '0;
    end else if (take) begin
      if (last_pos) active <= 1'b0;
      if (x == cfg_ww) begin
        x <= '0;
        y <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_emit  <= 1'b0;
      s1_y_ge1 <= 1'b0;
      s1_y_ge2 <= 1'b0;
      s1_x     <= '0;
      s1_word  <= '0;
    end else if (adv) begin
      s1_valid <= take;
      if (take) begin
        s1_emit  <= (y != '0) && (x != '0);
        s1_y_ge1 <= (y != '0);
        s1_y_ge2 <= (y > DIM_W'(1));
        s1_x     <= x;
        s1_word  <= pad ? '0 : in_data;
      end
    end
  end

  // line buffer: entry = {row y-1 (high half), row y-2 (low half)}
  word_t lb_prev1, lb_prev2;
  assign lb_prev1 = s1_y_ge1 ? lb_rdata[2*IN_WORD_W-1:IN_WORD_W] : '0;
  assign lb_prev2 = s1_y_ge2 ? lb_rdata[IN_WORD_W-1:0]           : '0;

  gmm_line_buffer #(.DEPTH(DEPTH), .DATA_W(2*IN_WORD_W)) u_lb (
    .clk  (clk),
    .re   (take),
    .raddr(AW'(x)),
    .rdata(lb_rdata),
    .we   (adv && s1_valid),
    .waddr(AW'(s1_x)),
    .wdata({s1_word, lb_prev1})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= '0;
      c1 <= '0;
      c2 <= '0;
      s2_valid <= 1'b0;
    end else if (adv) begin
      s2_valid <= s1_valid && s1_emit;
      if (s1_valid) begin
        c2 <= c1;
        c1 <= c0;
        c0 <= '{top: lb_prev2, mid: lb_prev1, bot: s1_word};
      end
    end
  end

  // stage 3: four lanes over the 3 x 12 pixel history
  pix_t [2:0][3*LANES-1:0] hist;
  pix_t [LANES-1:0][KTAPS-1:0] win;
  res_t [LANES-1:0] res;

  assign hist[0] = {c0.top, c1.top, c2.top};
  assign hist[1] = {c0.mid, c1.mid, c2.mid};
  assign hist[2] = {c0.bot, c1.bot, c2.bot};

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    for (genvar r = 0; r < 3; r++) begin : g_row
      for (genvar c = 0; c < 3; c++) begin : g_col
        // output pixel k sits at history index LANES + k
        assign win[k][3*r+c] = hist[r][LANES + k + c - 1];
      end
    end
    gmm_conv_lane u_lane (.win(win[k]), .coef(coef), .res(res[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (adv) begin
      out_valid <= s2_valid;
      if (s2_valid) out_data <= res;
    end
  end

  // done once the grid is walked and the pipeline has drained
  logic running;
  assign busy = running;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) running <= 1'b1;
      else if (running && !active && !s1_valid && !s2_valid && !out_valid) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // the grid counter never runs past the padding row
  assert property (@(posedge clk) disable iff (!rst_n) active |-> (y <= cfg_h && x <= cfg_ww));
endmodule
