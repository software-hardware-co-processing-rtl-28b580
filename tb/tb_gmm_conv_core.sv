// tb_gmm_conv_core: self-checking test of the streaming convolution core.
//
// Feeds random images of random size (including one row, one word wide and
// the full 1280-pixel width) with random input gaps and random output
// backpressure, and compares every output word with a zero-padded 3x3
// convolution computed here pixel by pixel. Also runs the Sobel X and Y
// kernels, and with no gaps or stalls checks that a frame takes
// (W/4 + 1) * (H + 1) cycles plus a fixed pipeline latency.
module tb_gmm_conv_core;
  import gmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [DIM_W-1:0] cfg_ww = '0, cfg_h = '0;
  coef_t [KTAPS-1:0] coef;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, busy, done;
  logic [31:0] in_data = '0;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  int W, H, gap_pct = 0, bp_pct = 0;
  int n_in, n_out, dones;
  byte unsigned img [];

  gmm_conv_core dut (.*);
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

  function automatic int ref_out(int r, int c);
    int s = 0;
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        s += px(r + dr - 1, c + dc - 1) * int'(coef[3*dr + dc]);
    return s > 32767 ? 32767 : (s < -32768 ? -32768 : s);
  endfunction

  always @(posedge clk) begin
    if (done) dones++;
    if (rst_n && in_valid && in_ready) n_in++;
    if (rst_n && out_valid && out_ready) begin
      int r, c0;
      r  = n_out / (W / 4);
      c0 = 4 * (n_out % (W / 4));
      for (int k = 0; k < 4; k++) begin
        int exp;
        exp = ref_out(r, c0 + k);
        checks++;
        if (int'($signed(out_data[16*k +: 16])) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): got %0d exp %0d", r, c0 + k,
                                      $signed(out_data[16*k +: 16]), exp);
        end
      end
      n_out++;
    end
    out_ready <= ($urandom_range(99) >= bp_pct);
  end

  // source: offers image word n_in, with random gaps
  always @(negedge clk) begin
    if (n_in < W * H / 4 && busy) begin
      in_valid <= ($urandom_range(99) >= gap_pct);
      in_data  <= {img[4*n_in + 3], img[4*n_in + 2], img[4*n_in + 1], img[4*n_in]};
    end else in_valid <= 0;
  end

  task automatic frame(int w, int h, output int cyc);
    int d0;
    W = w; H = h;
    img = new[W * H];
    foreach (img[i]) img[i] = byte'($urandom);
    n_in = 0; n_out = 0; d0 = dones;
    cfg_ww = DIM_W'(W / 4); cfg_h = DIM_W'(H);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (dones == d0) begin @(negedge clk); cyc++; end
    checks++;
    if (n_out != W * H / 4 || n_in != W * H / 4) begin
      failures++; $display("FAIL frame %0dx%0d: %0d in, %0d out", W, H, n_in, n_out);
    end
  endtask

  task automatic rand_coef();
    for (int t = 0; t < KTAPS; t++) coef[t] = coef_t'($urandom);
  endtask

  initial begin
    int cyc;
    dones = 0;
    coef = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    gap_pct = 30; bp_pct = 30;
    for (int f = 0; f < 12; f++) begin
      rand_coef();
      if (f % 4 == 0) for (int t = 0; t < KTAPS; t++) coef[t] = coef_t'($signed(3'($urandom)));
      frame(4 * $urandom_range(1, 12), $urandom_range(1, 12), cyc);
    end
    frame(4, 1, cyc);
    // Sobel X and Y kernels on a full-width strip
    coef = '{8'sd1, 8'sd0, -8'sd1, 8'sd2, 8'sd0, -8'sd2, 8'sd1, 8'sd0, -8'sd1};
    frame(1280, 3, cyc);
    coef = '{-8'sd1, -8'sd2, -8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd1, 8'sd2, 8'sd1};
    frame(1280, 3, cyc);
    // rate: one word per cycle with no gaps and no backpressure
    gap_pct = 0; bp_pct = 0;
    @(negedge clk);
    rand_coef();
    frame(64, 10, cyc);
    checks++;
    // start to done: one grid position per cycle, plus one cycle for this
    // source to see busy, three pipeline stages, the done register and one
    // cycle of counting here
    if (cyc != (64 / 4 + 1) * (10 + 1) + 6) begin
      failures++; $display("FAIL rate: %0d cycles, expected %0d", cyc, (64 / 4 + 1) * (10 + 1) + 6);
    end
    $display("frame 64x10 took %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
