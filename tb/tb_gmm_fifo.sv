// tb_gmm_fifo: self-checking test of the first-word-fall-through FIFO.
//
// Pushes and pops at random against a queue kept here, never pushing when
// full or popping when empty, and checks head data, count, empty and full
// every cycle; fills it to the brim and drains it at least once.
module tb_gmm_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [15:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0] model [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  gmm_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          (model.size() > 0 && rdata !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d: count %0d exp %0d", i, count, model.size());
      end
      if (full) fulls++;
      if (empty) empties++;
      push = !full && ($urandom_range(99) < ((i / 500) % 2 ? 70 : 30));
      pop  = !empty && ($urandom_range(99) < ((i / 500) % 2 ? 30 : 70));
      wdata = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("FAIL never full or never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
