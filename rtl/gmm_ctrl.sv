// gmm_ctrl: GPIO start/acknowledge handshake and job sequencer of the GMM.
//
// The processor starts a job by raising gpio_m and learns that it has ended
// when gpio_f rises; it then lowers gpio_m, and the GMM lowers gpio_f
// (a four-phase handshake). gpio_m comes from another clock domain and is
// passed through a two-flop synchroniser. On a rising edge of gpio_m the
// controller latches the register-file configuration, checks it (width a
// nonzero multiple of 4 and at most MAX_WIDTH, height nonzero) and, if it is
// good, pulses start to the read master, the core and the write master, then
// waits for the write master's done. A bad configuration is acknowledged at
// once with err set, so software never waits forever. cycles counts the clock
// cycles of the last job from start to the write master's done.
// Start on one GPIO and acknowledge on another follow the design description;
// the four-phase protocol, the check and the cycle counter are this design's.
module gmm_ctrl
  import gmm_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1280
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gpio_m,      // start request from the processor
  output logic         gpio_f,      // acknowledge to the processor
  input  gmm_cfg_t     cfg_in,      // register-file contents
  output gmm_cfg_t     cfg,         // configuration latched for the job
  output logic         job_start,   // one-cycle pulse
  input  logic         job_done,    // write master done
  output logic         busy,
  output logic         done,        // sticky: last job finished
  output logic         err,         // sticky: last request had a bad configuration
  output logic [31:0]  cycles
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ACK} state_t;
  state_t state;

  logic [2:0] m_sync;   // two synchroniser flops plus one for edge detection
  logic m_level, m_rise, cfg_ok;

  assign m_level = m_sync[1];
  assign m_rise  = m_sync[1] && !m_sync[2];
  assign cfg_ok  = (cfg_in.width != '0) && (cfg_in.width[1:0] == 2'b00) &&
                   (cfg_in.width <= DIM_W'(MAX_WIDTH)) && (cfg_in.height != '0);
  assign busy    = (state == S_RUN);
  assign gpio_f  = (state == S_ACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_sync    <= '0;
      state     <= S_IDLE;
      cfg       <= '0;
      job_start <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      cycles    <= '0;
    end else begin
      m_sync    <= {m_sync[1:0], gpio_m};
      job_start <= 1'b0;
      unique case (state)
        S_IDLE: if (m_rise) begin
          done <= 1'b0;
          cfg  <= cfg_in;
          if (cfg_ok) begin
            err       <= 1'b0;
            job_start <= 1'b1;
            cycles    <= '0;
            state     <= S_RUN;
          end else begin
            err   <= 1'b1;
            state <= S_ACK;
          end
        end
        S_RUN: begin
          cycles <= cycles + 1'b1;
          if (job_done) begin
            done  <= 1'b1;
            state <= S_ACK;
          end
        end
        S_ACK: if (!m_level) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
