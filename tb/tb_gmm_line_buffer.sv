// tb_gmm_line_buffer: self-checking test of the two-row line buffer RAM.
//
// Fills the RAM with random words while keeping a shadow copy, then reads
// random addresses and checks the data one cycle later, that the output
// holds while read enable is low, and that a read and a write to the same
// address in one cycle return the old word.
module tb_gmm_line_buffer;
  localparam int unsigned DEPTH = 21, DW = 64, AW = $clog2(DEPTH);
  logic clk = 0;
  logic re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [DW-1:0] rdata, wdata = '0;
  logic [DW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  gmm_line_buffer #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_data(logic [DW-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [DW-1:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      int a = $urandom_range(DEPTH-1);
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      expect_data(shadow[a], "read");
      held = rdata;
      raddr = AW'($urandom_range(DEPTH-1));
      @(negedge clk);
      expect_data(held, "hold");
    end
    // read-during-write to one address returns the old word
    for (int i = 0; i < 50; i++) begin
      int a = $urandom_range(DEPTH-1);
      @(negedge clk);
      re = 1; raddr = AW'(a); we = 1; waddr = AW'(a); wdata = {$urandom, $urandom};
      @(negedge clk);
      re = 0; we = 0;
      expect_data(shadow[a], "read-during-write");
      shadow[a] = wdata;
      re = 1;
      @(negedge clk); re = 0;
      expect_data(shadow[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
