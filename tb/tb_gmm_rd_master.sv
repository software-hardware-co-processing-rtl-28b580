// tb_gmm_rd_master: self-checking test of the image read master.
//
// The memory model holds random bytes. Several jobs of random length and
// start address are read while the consumer side applies random
// backpressure; every word that leaves the master is compared with the
// bytes at src + 4*i. Also checks that done pulses once per job, that the
// stream carries exactly nwords words, and that with no stalls anywhere the
// master reaches one word per cycle.
module tb_gmm_rd_master;
  import gmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [ADDR_W-1:0] src = '0;
  logic [2*DIM_W-1:0] nwords = '0;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [ADDR_W-1:0] rd_req_addr;
  logic [31:0] rd_resp_data;
  logic out_valid, out_ready = 0, busy, done;
  logic [31:0] out_data;
  logic wr_req_ready, wr_resp_valid;
  int checks = 0, failures = 0, got = 0, dones = 0, bp_pct = 30;

  gmm_rd_master dut (.*);
  gmm_mem_model #(.STALL_PCT(15)) mem (
    .clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_req_valid(1'b0), .wr_req_ready, .wr_req_addr(32'd0), .wr_req_data(64'd0), .wr_resp_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [31:0] a, exp;
      a = src + 32'(4 * got);
      exp = {mem.peek(a + 3), mem.peek(a + 2), mem.peek(a + 1), mem.peek(a)};
      checks++;
      if (out_data !== exp || got >= int'(nwords)) begin
        failures++;
        $display("FAIL word %0d: got %h exp %h", got, out_data, exp);
      end
      got++;
    end
    if (done) dones++;
    out_ready <= ($urandom_range(99) >= bp_pct);
  end

  task automatic run(int n, logic [31:0] base, output int cyc);
    int d0 = dones;
    got = 0; src = base; nwords = (2*DIM_W)'(n);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (dones == d0) begin @(negedge clk); cyc++; end
    checks++;
    if (got != n || dones != d0 + 1) begin
      failures++; $display("FAIL job: %0d words of %0d, %0d dones", got, n, dones - d0);
    end
  endtask

  initial begin
    int cyc;
    for (int a = 0; a < 4096; a++) mem.poke(32'h1000 + 32'(a), 8'($urandom));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 8; j++) run($urandom_range(300, 1), 32'h1000 + 32'(4 * $urandom_range(100)), cyc);
    // throughput: no stalls and one-cycle latency
    force mem.rd_req_ready = 1'b1;
    bp_pct = 0;
    @(negedge clk);
    run(500, 32'h1000, cyc);
    checks++;
    if (cyc > 500 + 10) begin failures++; $display("FAIL throughput: %0d cycles for 500 words", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
