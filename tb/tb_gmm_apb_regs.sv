// tb_gmm_apb_regs: self-checking test of the APB register file.
//
// Performs APB write and read transfers (setup then access phase) to every
// register, checks read-back values and the configuration record, the
// sign extension of coefficients, the status and cycle inputs, and that
// unmapped offsets and writes to read-only registers raise pslverr.
module tb_gmm_apb_regs;
  import gmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  gmm_cfg_t cfg;
  logic st_busy = 0, st_done = 0, st_err = 0;
  logic [31:0] st_cycles = '0;
  int checks = 0, failures = 0;

  gmm_apb_regs dut (.*);
  always #5 clk = ~clk;

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

  task automatic apb(input logic wr, input logic [7:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 rd = prdata; err = pslverr;
    chk(32'(pready), 1, "pready");
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] rd;
    logic err;
    logic [31:0] src, dst;
    logic [7:0] cf [KTAPS];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      src = $urandom; dst = $urandom;
      apb(1, REG_SRC, src, rd, err);        chk(32'(err), 0, "src write err");
      apb(1, REG_DST, dst, rd, err);
      apb(1, REG_WIDTH, 32'd1280, rd, err);
      apb(1, REG_HEIGHT, 32'd720, rd, err);
      for (int k = 0; k < KTAPS; k++) begin
        cf[k] = 8'($urandom);
        apb(1, REG_COEF0 + 8'(4*k), {$urandom, cf[k]} , rd, err);
      end
      apb(0, REG_SRC, 0, rd, err);     chk(rd, src, "src readback");
      apb(0, REG_DST, 0, rd, err);     chk(rd, dst, "dst readback");
      apb(0, REG_WIDTH, 0, rd, err);   chk(rd, 32'd1280, "width readback");
      apb(0, REG_HEIGHT, 0, rd, err);  chk(rd, 32'd720, "height readback");
      for (int k = 0; k < KTAPS; k++) begin
        apb(0, REG_COEF0 + 8'(4*k), 0, rd, err);
        chk(rd, {{24{cf[k][7]}}, cf[k]}, "coef readback");
        chk(32'({cfg.coef[k]}), 32'(cf[k]), "cfg coef");
        chk(32'(err), 0, "coef err");
      end
      chk(cfg.src_addr, src, "cfg src");
      chk(cfg.dst_addr, dst, "cfg dst");
      chk(32'(cfg.width), 32'd1280, "cfg width");
      chk(32'(cfg.height), 32'd720, "cfg height");
    end
    st_busy = 1; st_done = 0; st_err = 1; st_cycles = 32'h1234_5678;
    apb(0, REG_STATUS, 0, rd, err);  chk(rd, 32'h5, "status");
    apb(0, REG_CYCLES, 0, rd, err);  chk(rd, 32'h1234_5678, "cycles");
    apb(1, REG_STATUS, 0, rd, err);  chk(32'(err), 1, "write to RO err");
    apb(0, 8'h1C, 0, rd, err);       chk(32'(err), 1, "unmapped err");
    apb(0, 8'h44, 0, rd, err);       chk(32'(err), 1, "past coef err");
    apb(1, 8'h44, 32'hff, rd, err);  chk(32'({cfg.coef[0]}), 32'(cf[0]), "no stray write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
