// gmm_wr_master: writes the convolution results to memory.
//
// After start it takes NWORDS 64-bit result words from the core stream and
// issues one write per word, at byte address dst + 8*i. The write channel is
// a valid/ready pair carrying address and data together; the memory answers
// each accepted write with a one-cycle response pulse, in any delay. done
// pulses when the response to the last write has arrived, so the data are in
// memory when the GMM acknowledges the job. One write per cycle when the
// memory accepts one per cycle. The channel format is this design's own.
module gmm_wr_master
  import gmm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     dst,
  input  logic [2*DIM_W-1:0]    nwords,     // >= 1
  // result stream from the core
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [OUT_WORD_W-1:0] in_data,
  // memory write request / response
  output logic                  wr_req_valid,
  input  logic                  wr_req_ready,
  output logic [ADDR_W-1:0]     wr_req_addr,
  output logic [OUT_WORD_W-1:0] wr_req_data,
  input  logic                  wr_resp_valid,
  output logic                  busy,
  output logic                  done
);
  logic [2*DIM_W-1:0] sent, acked;
  logic               sending;

  assign sending      = busy && (sent != nwords);
  assign wr_req_valid = sending && in_valid;
  assign in_ready     = sending && wr_req_ready;
  assign wr_req_addr  = dst + ADDR_W'({sent, 3'b000});
  assign wr_req_data  = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      sent  <= '0;
      acked <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        sent  <= '0;
        acked <= '0;
      end else if (busy) begin
        if (wr_req_valid && wr_req_ready) sent <= sent + 1'b1;
        if (wr_resp_valid) begin
          acked <= acked + 1'b1;
          if (acked == nwords - 1'b1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_req_valid && !wr_req_ready |=> wr_req_valid && $stable(wr_req_addr) && $stable(wr_req_data));
  assert property (@(posedge clk) disable iff (!rst_n) wr_resp_valid |-> busy && acked < sent);
endmodule
