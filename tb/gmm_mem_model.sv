// gmm_mem_model: behavioural model of the external DDR memory, for testbenches.
//
// Byte-addressed sparse memory (unwritten bytes read as zero) with the GMM's
// two channels. Read: requests are accepted when rd_req_ready is high (low at
// random, STALL_PCT percent of cycles); 4-byte data return in order after a
// random delay of RD_LAT_MIN..RD_LAT_MAX cycles, at most one per cycle.
// Write: an 8-byte write is accepted when wr_req_ready is high (random stalls
// likewise) and answered by a one-cycle wr_resp_valid after 1..8 cycles, in
// order. Counters record stalls and transfers for coverage.
module gmm_mem_model #(
  parameter int STALL_PCT  = 20,
  parameter int RD_LAT_MIN = 1,
  parameter int RD_LAT_MAX = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [31:0] rd_req_addr,
  output logic        rd_resp_valid,
  output logic [31:0] rd_resp_data,
  input  logic        wr_req_valid,
  output logic        wr_req_ready,
  input  logic [31:0] wr_req_addr,
  input  logic [63:0] wr_req_data,
  output logic        wr_resp_valid
);
  logic [7:0] mem [logic [31:0]];
  longint unsigned now = 0;
  longint unsigned rd_due[$], wr_due[$];
  logic [31:0] rd_addr_q[$];
  int rd_stalls = 0, wr_stalls = 0, reads = 0, writes = 0;

  function automatic logic [7:0] peek(logic [31:0] a);
    return mem.exists(a) ? mem[a] : 8'h00;
  endfunction

  function automatic void poke(logic [31:0] a, logic [7:0] d);
    mem[a] = d;
  endfunction

  initial begin
    rd_req_ready = 0; wr_req_ready = 0; rd_resp_valid = 0; wr_resp_valid = 0; rd_resp_data = '0;
  end

  always @(posedge clk) begin
    now++;
    // sample requests of the cycle that ends now
    if (rst_n && rd_req_valid && rd_req_ready) begin
      rd_addr_q.push_back(rd_req_addr);
      rd_due.push_back(now + longint'($urandom_range(RD_LAT_MAX, RD_LAT_MIN)));
      reads++;
    end
    if (rst_n && rd_req_valid && !rd_req_ready) rd_stalls++;
    if (rst_n && wr_req_valid && wr_req_ready) begin
      for (int b = 0; b < 8; b++) mem[wr_req_addr + 32'(b)] = wr_req_data[8*b +: 8];
      wr_due.push_back(now + longint'($urandom_range(8, 1)));
      writes++;
    end
    if (rst_n && wr_req_valid && !wr_req_ready) wr_stalls++;
    // drive the next cycle
    rd_req_ready  <= ($urandom_range(99) >= STALL_PCT);
    wr_req_ready  <= ($urandom_range(99) >= STALL_PCT);
    rd_resp_valid <= 1'b0;
    wr_resp_valid <= 1'b0;
    if (rd_due.size() > 0 && rd_due[0] <= now) begin
      logic [31:0] a;
      void'(rd_due.pop_front());
      a = rd_addr_q.pop_front();
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= {peek(a + 3), peek(a + 2), peek(a + 1), peek(a)};
    end
    if (wr_due.size() > 0 && wr_due[0] <= now) begin
      void'(wr_due.pop_front());
      wr_resp_valid <= 1'b1;
    end
  end
endmodule
