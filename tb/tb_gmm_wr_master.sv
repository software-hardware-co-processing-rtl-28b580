// tb_gmm_wr_master: self-checking test of the result write master.
//
// A producer offers random 64-bit words with random gaps while the memory
// model stalls and delays responses at random. After each job the memory
// must hold every word at dst + 8*i, no byte past the end may be written,
// done must pulse once and only after the last response, and the master
// must take no more than nwords words from the stream.
module tb_gmm_wr_master;
  import gmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [ADDR_W-1:0] dst = '0;
  logic [2*DIM_W-1:0] nwords = '0;
  logic in_valid = 0, in_ready;
  logic [63:0] in_data = '0;
  logic wr_req_valid, wr_req_ready, wr_resp_valid;
  logic [ADDR_W-1:0] wr_req_addr;
  logic [63:0] wr_req_data;
  logic busy, done;
  logic rd_req_ready, rd_resp_valid;
  logic [31:0] rd_resp_data;
  logic [63:0] words [$];
  int checks = 0, failures = 0, dones = 0, taken = 0;

  gmm_wr_master dut (.*);
  gmm_mem_model #(.STALL_PCT(25)) mem (
    .clk, .rst_n, .rd_req_valid(1'b0), .rd_req_ready, .rd_req_addr(32'd0), .rd_resp_valid,
    .rd_resp_data, .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_resp_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer: offers words[taken] with random gaps, holding it until taken
  always @(posedge clk) begin
    if (done) dones++;
    if (in_valid && in_ready) taken++;
  end
  always @(negedge clk) begin
    if (taken < words.size()) begin
      if (!in_valid) in_valid <= ($urandom_range(3) != 0);
      in_data <= words[taken];
    end else in_valid <= 0;
  end

  task automatic run(int n, logic [31:0] base);
    int d0 = dones;
    int t = 0;
    words.delete();
    for (int i = 0; i < n; i++) words.push_back({$urandom, $urandom});
    words.push_back(64'hdead_beef_dead_beef);   // one extra that must not be taken
    taken = 0; dst = base; nwords = (2*DIM_W)'(n);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (dones == d0 && t < 50000) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);
    checks++;
    if (dones != d0 + 1 || taken != n) begin
      failures++; $display("FAIL job: %0d dones, %0d taken of %0d", dones - d0, taken, n);
    end
    for (int i = 0; i <= n; i++) begin
      logic [63:0] m;
      for (int b = 0; b < 8; b++) m[8*b +: 8] = mem.peek(base + 32'(8*i + b));
      checks++;
      if (m !== (i < n ? words[i] : 64'd0)) begin
        failures++; $display("FAIL word %0d at %h: %h exp %h", i, base + 32'(8*i), m, words[i]);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 8; j++) run($urandom_range(200, 1), 32'h10_0000 * (j + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
