// gmm_rd_master: reads the input image from memory for the convolution core.
//
// After start it requests NWORDS = width/4 * height consecutive 32-bit words,
// starting at byte address src and stepping by 4. The request channel is a
// valid/ready pair carrying an address; read data come back in request order
// on a valid-only response channel that can never be refused. Requests are
// issued only while the sum of words in flight and words already buffered
// is below FIFO_DEPTH, so the response FIFO cannot overflow and the
// memory can return data back to back. The FIFO drains to the core through
// a valid/ready stream. done pulses when the last word has left the FIFO.
// With a memory that accepts one request per cycle the master sustains one
// word per cycle. Reading the image from DDR by physical address follows the
// design description; the channel format and the FIFO are this design's own.
module gmm_rd_master
  import gmm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     src,
  input  logic [2*DIM_W-1:0]    nwords,     // >= 1
  // memory read request / response
  output logic                  rd_req_valid,
  input  logic                  rd_req_ready,
  output logic [ADDR_W-1:0]     rd_req_addr,
  input  logic                  rd_resp_valid,
  input  logic [IN_WORD_W-1:0]  rd_resp_data,
  // stream to the core
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [IN_WORD_W-1:0]  out_data,
  output logic                  busy,
  output logic                  done
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH+1);

  logic [2*DIM_W-1:0] issued, popped;
  logic [CW-1:0]      credit_used, fifo_count;  // in flight + buffered
  logic               issuing, fifo_empty, fifo_full, pop;

  assign issuing      = busy && (issued != nwords) && (credit_used < CW'(FIFO_DEPTH));
  assign rd_req_valid = issuing;
  assign rd_req_addr  = src + ADDR_W'({issued, 2'b00});
  assign out_valid    = !fifo_empty;
  assign pop          = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      issued      <= '0;
      popped      <= '0;
      credit_used <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        issued <= '0;
        popped <= '0;
      end else if (busy) begin
        if (rd_req_valid && rd_req_ready) issued <= issued + 1'b1;
        if (pop) popped <= popped + 1'b1;
        if (pop && popped == nwords - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      credit_used <= credit_used + CW'(rd_req_valid && rd_req_ready) - CW'(pop);
    end
  end

  gmm_fifo #(.WIDTH(IN_WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .push(rd_resp_valid), .wdata(rd_resp_data),
    .pop(pop), .rdata(out_data),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  // buffered words are always part of the credits in use
  assert property (@(posedge clk) disable iff (!rst_n) fifo_count <= credit_used);
  // the credit scheme keeps responses from ever meeting a full FIFO
  assert property (@(posedge clk) disable iff (!rst_n) rd_resp_valid |-> !fifo_full);
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr));
endmodule
