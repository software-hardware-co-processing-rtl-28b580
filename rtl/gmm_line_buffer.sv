// gmm_line_buffer: simple dual-port RAM holding the two previous image rows.
//
// Each entry is one column of two rows, {row y-1, row y-2}, of one 4-pixel
// word. Read is synchronous with a read enable: rdata changes only in the
// cycle after a read with re high, and holds otherwise, so a stalled pipeline
// keeps its data. The write port is independent. A read and a write to the
// same address in one cycle return the old contents. Written as an array so
// that it maps to block RAM (the fabric's LSRAM); there is no reset and the
// contents start unknown, which the convolution core masks.
module gmm_line_buffer #(
  parameter int unsigned DEPTH  = 321,  // words per row, plus one padding word
  parameter int unsigned DATA_W = 64
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DATA_W-1:0]        rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DATA_W-1:0]        wdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
