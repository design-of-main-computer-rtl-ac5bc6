// tb_sync_fifo: self-checking test of the 2 KB channel buffer.
// Fills it to its full 2048 bytes against a reference queue, checks that a
// push when full is dropped, drains it in order, then runs random
// push/pop traffic (including simultaneous push and pop) and a clear.
module tb_sync_fifo;
  localparam int DEPTH = 2048;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  logic clear = 0, push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic [11:0] count;
  logic empty, full;
  int checks = 0, failures = 0;
  byte unsigned model[$];

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (count=%0d model=%0d)", what, count, model.size());
    end
  endtask

  // one clock of traffic, then compare with the model
  task automatic step(input logic do_push, input logic do_pop, input byte unsigned d);
    bit mp, mq;
    mq = do_pop && model.size() > 0;
    mp = do_push && model.size() < DEPTH;
    if (mq) check(rdata == model[0], "head value");
    push <= do_push; pop <= do_pop; wdata <= d;
    @(posedge clk);
    push <= 0; pop <= 0;
    if (mq) void'(model.pop_front());
    if (mp) model.push_back(d);
    @(negedge clk);
    check(count == 12'(model.size()), "count");
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < DEPTH; i++) step(1, 0, 8'(i * 7 + 3));
    check(full, "full at 2048 bytes");
    step(1, 0, 8'hEE);                     // dropped
    check(count == 12'(DEPTH), "push when full dropped");
    for (int i = 0; i < DEPTH; i++) step(0, 1, 0);
    check(empty, "empty after drain");
    step(0, 1, 0);                         // pop when empty ignored
    for (int i = 0; i < 3000; i++) step(1'($urandom), 1'($urandom), 8'($urandom));
    for (int i = 0; i < 40; i++) step(1, 1, 8'($urandom));
    clear <= 1; @(posedge clk); clear <= 0; model.delete();
    @(negedge clk);
    check(empty && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
