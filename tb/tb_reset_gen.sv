// tb_reset_gen: self-checking test of the board reset: power-on, the
// spacecraft reset discrete and the watch-dog each hold reset for the
// stretch time after they go away, and the cause register records the
// source until the next power-on.
module tb_reset_gen;
  localparam int ST = 16;
  logic clk = 0, por_n = 1, sc_reset = 0, wdt_expire = 0;
  initial #1 por_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, cpu_reset;
  logic [1:0] cause;
  int cyc;

  reset_gen #(.STRETCH(ST)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic time_release(output int n);
    n = 0;
    while (!rst_n && n < 1000) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check(!rst_n && cpu_reset, "reset during power-on");
    por_n <= 1;
    time_release(cyc);
    check(cyc == ST + 2, $sformatf("power-on release after %0d", cyc));
    check(cpu_reset == 0, "cpu reset released");
    check(cause == 2'b00, "power-on cause");
    repeat (10) @(posedge clk);
    // spacecraft discrete
    sc_reset <= 1;
    repeat (10) @(posedge clk);
    check(!rst_n && cpu_reset, "discrete resets board");
    sc_reset <= 0;
    time_release(cyc);
    check(cyc == ST + 4, $sformatf("discrete release after %0d", cyc));
    check(cause == 2'b01, "discrete cause");
    // watch-dog request, dropped half a clock after the edge that saw it
    repeat (10) @(posedge clk);
    wdt_expire <= 1;
    @(posedge clk); @(negedge clk);
    check(!rst_n, "watch-dog resets board");
    wdt_expire <= 0;
    time_release(cyc);
    check(cyc == ST + 1, $sformatf("watch-dog release after %0d", cyc));
    check(cause == 2'b10, "watch-dog cause");
    por_n <= 0; @(posedge clk); por_n <= 1;
    check(cause == 2'b00, "power-on clears cause");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
