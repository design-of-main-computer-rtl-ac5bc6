// tb_discrete_io: self-checking test of the discrete module: filtered
// levels, edge events (PMU active on both edges), rejection of short
// glitches, the output register and the reset cause read-back.
module tb_discrete_io;
  import sbc_pkg::*;
  localparam int F = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [31:0] rdata, d;
  logic sc_safe_hold = 0, sc_time_mark = 0, sc_pmu_active = 0, sc_spare = 0;
  logic [1:0] reset_cause = 2'b10;
  logic ev_safe_hold, ev_time_mark, ev_pmu_active, ev_spare, time_mark;
  logic pmu_status, thtm_sel, spare_out;
  logic [2:0] tlm;
  int n_sh = 0, n_tm = 0, n_pmu = 0, n_sp = 0;

  discrete_io #(.FILTER(F)) dut (.*);
  `include "tb_reg_tasks.svh"

  always @(posedge clk) if (rst_n) begin
    n_sh  += int'(ev_safe_hold);
    n_tm  += int'(ev_time_mark);
    n_pmu += int'(ev_pmu_active);
    n_sp  += int'(ev_spare);
  end

  initial begin repeat (10000) @(posedge clk); failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    // time-mark pulses of 20 cycles
    for (int k = 0; k < 3; k++) begin
      @(posedge clk); sc_time_mark <= 1;
      repeat (20) @(posedge clk); sc_time_mark <= 0;
      repeat (20) @(posedge clk);
    end
    check(n_tm == 3, $sformatf("three time-mark events, got %0d", n_tm));
    // glitch of F-2 cycles on safe-hold is dropped
    @(posedge clk); sc_safe_hold <= 1;
    repeat (F - 2) @(posedge clk); sc_safe_hold <= 0;
    repeat (20) @(posedge clk);
    check(n_sh == 0, "safe-hold glitch filtered");
    @(posedge clk); sc_safe_hold <= 1;
    repeat (20) @(posedge clk);
    check(n_sh == 1, "safe-hold event");
    // PMU active: both edges
    @(posedge clk); sc_pmu_active <= 1;
    repeat (20) @(posedge clk); sc_pmu_active <= 0;
    repeat (20) @(posedge clk);
    check(n_pmu == 2, "pmu active both edges");
    @(posedge clk); sc_spare <= 1; sc_pmu_active <= 1;
    repeat (20) @(posedge clk);
    check(n_sp == 1, "spare event");
    reg_rd(6'd0, d); check(d == 32'h2D, $sformatf("input levels and cause %h", d));
    @(posedge clk); sc_time_mark <= 1;
    repeat (F + 2) @(posedge clk);
    check(time_mark == 1'b0, "time-mark level waits for filter");
    repeat (2) @(posedge clk);
    check(time_mark == 1'b1, "time-mark level after filter");
    reg_wr(6'd1, 32'h2B);
    @(negedge clk);
    check(pmu_status && thtm_sel && tlm == 3'b010 && spare_out, "output register");
    reg_rd(6'd1, d); check(d == 32'h2B, "output readback");
    finish_tb();
  end
endmodule
