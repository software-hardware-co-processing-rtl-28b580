// tb_gmm_top_full: one full HD Sobel frame through the GMM at its default size.
//
// A 1280 x 720 8-bit image (a smooth gradient with random noise and a bright
// square, so that real edges appear) is convolved twice, with the
// horizontal and then the vertical Sobel kernel, as the processor would do
// it: APB configuration, gpio_m up, wait for gpio_f, gpio_m down. Memory
// here is a plain array behind the two channels with a fixed two-cycle read
// latency and no stalls, so the frame time is the GMM's own. Every write is
// checked on arrival against a zero-padded convolution computed here, and
// the L1 norm |Gx| + |Gy| is then formed in software from what was written.
// The frame must take (1280/4 + 1) * (720 + 1) cycles plus at most a small
// fixed latency, as read back from the CYCLES register.
module tb_gmm_top_full;
  import gmm_pkg::*;
  localparam int W = 1280, H = 720;
  localparam logic [31:0] SRC = 32'h4000_0000, DX = 32'h5000_0000, DY = 32'h6000_0000;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic gpio_m = 0, gpio_f;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [31:0] rd_req_addr, rd_resp_data;
  logic wr_req_valid, wr_req_ready, wr_resp_valid;
  logic [31:0] wr_req_addr;
  logic [63:0] wr_req_data;
  int checks = 0, failures = 0, bad = 0, writes = 0;

  byte unsigned img [W*H];
  shortint gx [W*H];
  shortint gy [W*H];
  coef_t [KTAPS-1:0] k;
  logic [31:0] dst;

  gmm_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 0;
    return int'(img[r * W + c]);
  endfunction

  function automatic int conv_ref(int r, int c);
    int s = 0;
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        s += px(r + dr - 1, c + dc - 1) * int'(k[3*dr + dc]);
    return s > 32767 ? 32767 : (s < -32768 ? -32768 : s);
  endfunction

  // memory: two-cycle read latency, writes checked as they arrive
  logic [31:0] rd_a1, rd_a2;
  logic        rd_v1, rd_v2, wr_v1;
  assign rd_req_ready = 1'b1;
  assign wr_req_ready = 1'b1;
  always @(posedge clk) begin
    rd_v1 <= rst_n && rd_req_valid;
    rd_a1 <= rd_req_addr - SRC;
    rd_v2 <= rd_v1;
    rd_a2 <= rd_a1;
    rd_resp_valid <= rd_v2;
    rd_resp_data  <= {img[rd_a2 + 3], img[rd_a2 + 2], img[rd_a2 + 1], img[rd_a2]};
    wr_v1 <= rst_n && wr_req_valid;
    wr_resp_valid <= wr_v1;
    if (rst_n && wr_req_valid) begin
      int p;
      p = int'((wr_req_addr - dst) >> 1);
      for (int i = 0; i < 4; i++) begin
        int e, g;
        g = int'($signed(wr_req_data[16*i +: 16]));
        e = conv_ref((p + i) / W, (p + i) % W);
        if (dst == DX) gx[p + i] = shortint'(g); else gy[p + i] = shortint'(g);
        checks++;
        if (g != e) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL pixel %0d: got %0d exp %0d", p + i, g, e);
        end
      end
      writes++;
    end
  end

  task automatic apb_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic apb_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic frame(logic [31:0] to, coef_t [KTAPS-1:0] kern);
    logic [31:0] cyc, st;
    int w0 = writes;
    k = kern; dst = to;
    apb_wr(REG_SRC, SRC);
    apb_wr(REG_DST, to);
    apb_wr(REG_WIDTH, W);
    apb_wr(REG_HEIGHT, H);
    for (int i = 0; i < KTAPS; i++) apb_wr(REG_COEF0 + 8'(4 * i), 32'($signed(kern[i])));
    @(negedge clk); gpio_m = 1;
    wait (gpio_f);
    apb_rd(REG_STATUS, st);
    apb_rd(REG_CYCLES, cyc);
    gpio_m = 0;
    wait (!gpio_f);
    checks++;
    if (st != 32'h2) begin failures++; $display("FAIL status %h", st); end
    checks++;
    if (writes - w0 != W * H / 4) begin failures++; $display("FAIL %0d writes", writes - w0); end
    checks++;
    if (cyc < (W / 4 + 1) * (H + 1) || cyc > (W / 4 + 1) * (H + 1) + 16) begin
      failures++; $display("FAIL frame took %0d cycles", cyc);
    end
    $display("frame of %0dx%0d: %0d cycles (grid %0d)", W, H, cyc, (W / 4 + 1) * (H + 1));
  endtask

  initial begin
    coef_t [KTAPS-1:0] sx, sy;
    int edges = 0;
    sx = '{8'sd1, 8'sd0, -8'sd1, 8'sd2, 8'sd0, -8'sd2, 8'sd1, 8'sd0, -8'sd1};
    sy = '{-8'sd1, -8'sd2, -8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd1, 8'sd2, 8'sd1};
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = (r / 6 + c / 10) % 200 + int'($urandom_range(15));
        if (r >= 200 && r < 500 && c >= 400 && c < 800) v = 240;
        img[r * W + c] = byte'(v);
      end
    repeat (4) @(negedge clk);
    rst_n = 1;
    frame(DX, sx);
    frame(DY, sy);
    // L1 norm in software; the square's outline must stand out
    for (int i = 0; i < W * H; i++) begin
      int m;
      m = (gx[i] < 0 ? -int'(gx[i]) : int'(gx[i])) + (gy[i] < 0 ? -int'(gy[i]) : int'(gy[i]));
      if (m > 400) edges++;
    end
    checks++;
    if (edges < 2 * (300 + 400)) begin failures++; $display("FAIL only %0d edge pixels", edges); end
    $display("L1 norm: %0d edge pixels above 400", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
