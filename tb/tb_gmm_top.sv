// tb_gmm_top: end-to-end test of the GMM coprocessor.
//
// The testbench plays the processor: it writes the configuration over APB,
// raises gpio_m, waits for gpio_f, reads STATUS and CYCLES, lowers gpio_m
// and checks that gpio_f falls. The memory model stalls both channels and
// delays read data and write responses at random. Each job's output image
// in memory is compared with a zero-padded 3x3 convolution computed here.
// One sequence runs the Sobel edge detector as the processor would use it:
// the horizontal gradient, then the vertical gradient, then the L1 norm
// |Gx| + |Gy| in software. Coverage counters make sure each mechanism
// happened at least once: read request stalls, write stalls holding
// the core, the read master running out of credits, saturation on
// both sides, a rejected configuration, and an APB error response.
module tb_gmm_top;
  import gmm_pkg::*;
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
  int checks = 0, failures = 0;
  int cov_core_stall = 0, cov_credit_full = 0, cov_sat_hi = 0, cov_sat_lo = 0;
  int cov_bad_cfg = 0, cov_slverr = 0, cov_sobel = 0;

  gmm_top dut (.*);
  gmm_mem_model #(.STALL_PCT(25), .RD_LAT_MIN(1), .RD_LAT_MAX(12)) mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // seen at the ports: a refused write holds the core's result register; a
  // running job that stops requesting before all words are asked for has
  // run out of read credits
  int job_words = 0, job_reqs = 0;
  logic job_on = 0;
  always @(posedge clk) begin
    if (wr_req_valid && !wr_req_ready) cov_core_stall++;
    if (job_on && job_reqs > 0 && job_reqs < job_words && !rd_req_valid) cov_credit_full++;
    if (rd_req_valid && rd_req_ready) job_reqs++;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic apb(input logic wr, input logic [7:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 rd = prdata; err = pslverr;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic apb_wr(logic [7:0] a, logic [31:0] d);
    logic [31:0] rd;
    logic err;
    apb(1, a, d, rd, err);
    chk(32'(err), 0, "apb write");
  endtask

  // configure and run one job through the GPIO handshake; returns CYCLES
  task automatic run_job(int w, int h, logic [31:0] src, logic [31:0] dst,
                         coef_t [KTAPS-1:0] k, output logic [31:0] cyc, output logic [31:0] st);
    logic [31:0] rd;
    logic err;
    int t = 0;
    apb_wr(REG_SRC, src);
    apb_wr(REG_DST, dst);
    apb_wr(REG_WIDTH, 32'(w));
    apb_wr(REG_HEIGHT, 32'(h));
    for (int i = 0; i < KTAPS; i++) apb_wr(REG_COEF0 + 8'(4 * i), 32'($signed(k[i])));
    job_words = w * h / 4; job_reqs = 0; job_on = 1;
    @(negedge clk); gpio_m = 1;
    while (!gpio_f && t < 2000000) begin @(negedge clk); t++; end
    job_on = 0;
    chk(32'(job_reqs), 32'(job_words), "read requests");
    apb(0, REG_STATUS, 0, st, err);
    apb(0, REG_CYCLES, 0, cyc, err);
    gpio_m = 0;
    t = 0;
    while (gpio_f && t < 100) begin @(negedge clk); t++; end
    chk(32'(gpio_f), 0, "gpio_f released");
  endtask

  function automatic int px(logic [31:0] src, int w, int h, int r, int c);
    if (r < 0 || r >= h || c < 0 || c >= w) return 0;
    return int'(mem.peek(src + 32'(r * w + c)));
  endfunction

  function automatic int conv_ref(logic [31:0] src, int w, int h, coef_t [KTAPS-1:0] k, int r, int c);
    int s = 0;
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        s += px(src, w, h, r + dr - 1, c + dc - 1) * int'(k[3*dr + dc]);
    return s > 32767 ? 32767 : (s < -32768 ? -32768 : s);
  endfunction

  function automatic int out_px(logic [31:0] dst, int w, int r, int c);
    logic [15:0] v;
    v = {mem.peek(dst + 32'(2 * (r * w + c)) + 1), mem.peek(dst + 32'(2 * (r * w + c)))};
    return int'($signed(v));
  endfunction

  task automatic check_image(int w, int h, logic [31:0] src, logic [31:0] dst, coef_t [KTAPS-1:0] k);
    int bad = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int e, g;
        e = conv_ref(src, w, h, k, r, c);
        g = out_px(dst, w, r, c);
        if (e == 32767) cov_sat_hi++;
        if (e == -32768) cov_sat_lo++;
        checks++;
        if (g != e) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL pixel (%0d,%0d): got %0d exp %0d", r, c, g, e);
        end
      end
  endtask

  task automatic fill(logic [31:0] src, int n);
    for (int i = 0; i < n; i++) mem.poke(src + 32'(i), 8'($urandom));
  endtask

  initial begin
    coef_t [KTAPS-1:0] k, sx, sy;
    logic [31:0] cyc, st, rd;
    logic err;
    int w, h;
    sx = '{8'sd1, 8'sd0, -8'sd1, 8'sd2, 8'sd0, -8'sd2, 8'sd1, 8'sd0, -8'sd1};
    sy = '{-8'sd1, -8'sd2, -8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd1, 8'sd2, 8'sd1};
    repeat (4) @(negedge clk);
    rst_n = 1;

    // random kernels and sizes
    for (int j = 0; j < 6; j++) begin
      w = 4 * $urandom_range(1, 20); h = $urandom_range(1, 16);
      for (int i = 0; i < KTAPS; i++) k[i] = coef_t'($urandom);
      fill(32'h0100_0000, w * h);
      run_job(w, h, 32'h0100_0000, 32'h0200_0000 + 32'(j * 32'h10000), k, cyc, st);
      chk(st, 32'h2, "status done");
      check_image(w, h, 32'h0100_0000, 32'h0200_0000 + 32'(j * 32'h10000), k);
      checks++;
      if (cyc < (w / 4 + 1) * (h + 1)) begin failures++; $display("FAIL cycles %0d too few", cyc); end
    end

    // Sobel: Gx, then Gy, then L1 norm in software
    w = 64; h = 24;
    fill(32'h0300_0000, w * h);
    run_job(w, h, 32'h0300_0000, 32'h0400_0000, sx, cyc, st);
    chk(st, 32'h2, "sobel x status");
    run_job(w, h, 32'h0300_0000, 32'h0500_0000, sy, cyc, st);
    chk(st, 32'h2, "sobel y status");
    check_image(w, h, 32'h0300_0000, 32'h0400_0000, sx);
    check_image(w, h, 32'h0300_0000, 32'h0500_0000, sy);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int gx, gy, ex, ey, l1;
        gx = out_px(32'h0400_0000, w, r, c); gy = out_px(32'h0500_0000, w, r, c);
        ex = conv_ref(32'h0300_0000, w, h, sx, r, c); ey = conv_ref(32'h0300_0000, w, h, sy, r, c);
        l1 = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        checks++;
        if (l1 != (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey)) failures++;
      end
    cov_sobel++;

    // rejected configuration: width not a multiple of 4
    apb_wr(REG_WIDTH, 32'd6);
    @(negedge clk); gpio_m = 1;
    repeat (10) @(negedge clk);
    chk(32'(gpio_f), 1, "bad cfg acknowledged");
    apb(0, REG_STATUS, 0, st, err);
    chk(st, 32'h4, "status err");
    if (st == 32'h4) cov_bad_cfg++;
    gpio_m = 0;
    repeat (6) @(negedge clk);
    chk(32'(gpio_f), 0, "bad cfg released");

    // APB error response
    apb(0, 8'hFC, 0, rd, err);
    chk(32'(err), 1, "pslverr");
    if (err) cov_slverr++;

    $display("coverage: rd stalls %0d, wr stalls %0d, core stalls %0d, credit full %0d, sat+ %0d, sat- %0d, bad cfg %0d, slverr %0d, sobel %0d",
             mem.rd_stalls, mem.wr_stalls, cov_core_stall, cov_credit_full, cov_sat_hi, cov_sat_lo,
             cov_bad_cfg, cov_slverr, cov_sobel);
    if (mem.rd_stalls == 0)  begin failures++; $display("FAIL never: read stall"); end
    if (mem.wr_stalls == 0)  begin failures++; $display("FAIL never: write stall"); end
    if (cov_core_stall == 0) begin failures++; $display("FAIL never: core stall"); end
    if (cov_credit_full == 0) begin failures++; $display("FAIL never: credit limit"); end
    if (cov_sat_hi == 0)     begin failures++; $display("FAIL never: positive saturation"); end
    if (cov_sat_lo == 0)     begin failures++; $display("FAIL never: negative saturation"); end
    if (cov_bad_cfg == 0)    begin failures++; $display("FAIL never: rejected config"); end
    if (cov_slverr == 0)     begin failures++; $display("FAIL never: APB error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
