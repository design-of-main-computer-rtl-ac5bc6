// tb_sys_timer: self-checking test of the 32-bit tick timer: no ticks while
// disabled, tick period RELOAD + 1 cycles, register read-back, reload change,
// and the default reload of 249999 (10 ms at 25 MHz).
module tb_sys_timer;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [31:0] rdata, d;
  logic tick;
  int ticks = 0;
  longint last = -1, period = 0, now = 0;

  sys_timer dut (.*);
  `include "tb_reg_tasks.svh"

  always @(posedge clk) begin
    now++;
    if (rst_n && tick) begin
      ticks++;
      if (last >= 0) period = now - last;
      last = now;
    end
  end

  initial begin repeat (700000) @(posedge clk); failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    reg_rd(6'd1, d); check(d == 32'd249999, "default reload");
    reg_rd(6'd2, d); check(d == 32'd0, "disabled after reset");
    repeat (100) @(posedge clk);
    check(ticks == 0, "no ticks when disabled");
    reg_wr(6'd1, 32'd99);
    reg_wr(6'd2, 32'd1);
    repeat (1000) @(posedge clk);
    check(ticks >= 9 && ticks <= 10, $sformatf("ticks %0d", ticks));
    check(period == 100, $sformatf("period %0d", period));
    reg_rd(6'd0, d); check(d < 100, "count in range");
    reg_wr(6'd2, 32'd0);
    ticks = 0;
    repeat (300) @(posedge clk);
    check(ticks == 0, "stopped");
    reg_wr(6'd1, 32'd249999);
    reg_wr(6'd2, 32'd1);
    repeat (520000) @(posedge clk);
    check(period == 250000, $sformatf("10 ms period %0d", period));
    finish_tb();
  end
endmodule
