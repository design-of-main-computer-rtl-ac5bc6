// tb_pic: self-checking test of the interrupt controller: edge capture,
// masking, write-one-to-clear, priority vector, and that a held level does
// not raise a second request.
module tb_pic;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [31:0] rdata, d;
  logic [7:0] src = 0;
  logic intr;

  pic #(.NUM_IRQ(8)) dut (.*);
  `include "tb_reg_tasks.svh"

  initial begin repeat (10000) @(posedge clk); failures++; finish_tb(); end

  task automatic pulse(input int i);
    @(posedge clk); src[i] <= 1; @(posedge clk); src[i] <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    pulse(5);
    repeat (2) @(posedge clk);
    reg_rd(6'd0, d); check(d == 32'h20, "pending line 5");
    check(!intr, "masked line gives no intr");
    reg_wr(6'd1, 32'h24);                     // enable lines 2 and 5
    @(negedge clk); check(intr, "intr after unmask");
    reg_rd(6'd2, d); check(d == 32'h8000_0005, "vector 5");
    pulse(2);
    repeat (2) @(posedge clk);
    reg_rd(6'd2, d); check(d == 32'h8000_0002, "vector 2 has priority");
    reg_wr(6'd0, 32'h04);                     // clear 2
    reg_rd(6'd0, d); check(d == 32'h20, "clear only line 2");
    reg_wr(6'd0, 32'h20);
    @(negedge clk); check(!intr, "intr drops after clear");
    reg_rd(6'd2, d); check(d == 32'h0, "vector empty");
    // held level: one edge only
    @(posedge clk); src[2] <= 1;
    repeat (3) @(posedge clk);
    reg_wr(6'd0, 32'h04);
    repeat (3) @(posedge clk);
    reg_rd(6'd0, d); check(d == 32'h0, "held level no re-trigger");
    @(posedge clk); src[2] <= 0;
    // all lines
    for (int i = 0; i < 8; i++) pulse(i);
    repeat (2) @(posedge clk);
    reg_rd(6'd0, d); check(d == 32'hFF, "all lines pending");
    reg_rd(6'd1, d); check(d == 32'h24, "mask readback");
    reg_wr(6'd1, 32'h80);
    reg_wr(6'd0, 32'h7F);
    reg_rd(6'd2, d); check(d == 32'h8000_0007, "vector 7");
    finish_tb();
  end
endmodule
