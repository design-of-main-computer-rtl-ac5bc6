// tb_wdt: self-checking test of the watch-dog timer: kicks with the key
// keep it alive, a wrong key does not, and it expires exactly TIMEOUT
// cycles after the last kick and stays expired until reset.
module tb_wdt;
  import sbc_pkg::*;
  localparam int TO = 200;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [31:0] rdata, d;
  logic expire;
  int cyc;

  wdt #(.TIMEOUT(TO)) dut (.*);
  `include "tb_reg_tasks.svh"

  initial begin repeat (20000) @(posedge clk); failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < 10; k++) begin
      repeat (TO - 20) @(posedge clk);
      reg_wr(6'd0, 32'hA5);
    end
    check(!expire, "kicked watch-dog alive");
    reg_rd(6'd1, d); check(d > TO - 10 && d <= TO, "count reloaded");
    // a wrong key does not reload: expiry still counts from the last kick
    reg_wr(6'd0, 32'hA5);
    repeat (100) @(posedge clk);
    reg_wr(6'd0, 32'h5A);
    cyc = 0;
    while (!expire && cyc < 2 * TO) begin @(negedge clk); cyc++; end
    check(expire, "expires without kick");
    check(cyc == TO - 100, $sformatf("wrong key ignored, expiry after %0d", cyc));
    // exact: kick then count
    rst_n <= 0; @(posedge clk); rst_n <= 1;
    reg_wr(6'd0, 32'hA5);
    cyc = 0;
    while (!expire && cyc < 2 * TO) begin @(negedge clk); cyc++; end
    check(cyc == TO + 2, $sformatf("expiry %0d cycles after kick", cyc));
    reg_wr(6'd0, 32'hA5);
    repeat (5) @(posedge clk);
    check(expire, "stays expired");
    finish_tb();
  end
endmodule
