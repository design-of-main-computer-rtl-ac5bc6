// tb_lvds_ctrl: self-checking test of the NUC lines: start/stop photo from
// the register, time-mark forwarded one clock later.
module tb_lvds_ctrl;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [31:0] rdata, d;
  logic time_mark = 0, nuc_tm, nuc_stph;

  lvds_ctrl dut (.*);
  `include "tb_reg_tasks.svh"

  initial begin repeat (10000) @(posedge clk); failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    @(negedge clk); check(!nuc_stph, "stopped after reset");
    reg_wr(6'd0, 32'h1);
    @(posedge clk); @(negedge clk);
    check(nuc_stph, "start photo");
    reg_rd(6'd0, d); check(d == 32'h1, "readback");
    reg_wr(6'd0, 32'h0);
    @(posedge clk); @(negedge clk);
    check(!nuc_stph, "stop photo");
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); time_mark = 1'(k % 2 == 0);
      @(negedge clk); check(nuc_tm == time_mark, "time-mark forwarded");
    end
    finish_tb();
  end
endmodule
