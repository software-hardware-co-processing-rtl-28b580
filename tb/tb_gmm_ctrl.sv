// tb_gmm_ctrl: self-checking test of the GPIO handshake controller.
//
// Plays the processor side: raises gpio_m, checks that one start pulse
// follows with the configuration latched, answers with job_done after a
// random delay, checks that gpio_f rises, done is set and the cycle count is
// right, then lowers gpio_m and checks gpio_f falls. Also checks that a bad
// configuration is acknowledged at once with err set and no start pulse.
module tb_gmm_ctrl;
  import gmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic gpio_m = 0, gpio_f;
  gmm_cfg_t cfg_in, cfg;
  logic job_start, job_done = 0, busy, done, err;
  logic [31:0] cycles;
  int checks = 0, failures = 0, starts = 0;

  gmm_ctrl #(.MAX_WIDTH(64)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (job_start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic job(input logic good, input int delay);
    int s0, t;
    s0 = starts;
    cfg_in = '0;
    cfg_in.src_addr = $urandom; cfg_in.dst_addr = $urandom;
    cfg_in.width = good ? DIM_W'(4 * $urandom_range(1, 16)) : DIM_W'(6);
    cfg_in.height = DIM_W'($urandom_range(1, 100));
    @(negedge clk); gpio_m = 1;
    t = 0;
    while (!job_start && !gpio_f && t < 20) begin @(negedge clk); t++; end
    if (good) begin
      chk(32'(job_start), 1, "start pulse");
      @(negedge clk);
      chk(32'(busy), 1, "busy");
      chk(32'(cfg == cfg_in), 1, "cfg latched");
      cfg_in.src_addr = ~cfg_in.src_addr;   // later changes must not leak in
      repeat (delay) @(negedge clk);
      chk(32'(gpio_f), 0, "no early ack");
      job_done = 1; @(negedge clk); job_done = 0;
      chk(32'(gpio_f), 1, "ack");
      chk(32'(done), 1, "done");
      chk(32'(err), 0, "no err");
      // RUN lasts from the clock edge that raised job_start to the one that saw job_done
      chk(cycles, 32'(delay + 2), "cycle count");
      chk(32'(cfg.src_addr != cfg_in.src_addr), 1, "cfg held");
    end else begin
      repeat (2) @(negedge clk);
      chk(32'(gpio_f), 1, "bad cfg ack");
      chk(32'(err), 1, "err");
    end
    chk(32'(starts - s0), good ? 1 : 0, "start count");
    repeat (5) @(negedge clk);
    chk(32'(gpio_f), 1, "ack held while gpio_m high");
    gpio_m = 0;
    repeat (4) @(negedge clk);
    chk(32'(gpio_f), 0, "ack released");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(32'(gpio_f), 0, "idle");
    for (int i = 0; i < 30; i++) job(i % 5 != 4, $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
