// tb_sbc_full: the whole-board scenario of tb_sbc_body.svh with sbc_top at
// its default sizes: 25 MHz clock, 19200 and 56400 bit/s serial channels
// (1302 and 443 clocks per bit), 2 KB channel buffers, a 10 ms timer tick
// and the 1 s watch-dog, which is left to expire once.
module tb_sbc_full;
  localparam int DIV19      = 1302;
  localparam int DIV56      = 443;
  localparam int WDT_TO     = 25_000_000;
  localparam int TMR_RELOAD = 249_999;
  localparam bit RUN_WDT    = 1'b1;

  `include "tb_sbc_body.svh"

  sbc_top dut (.*);

  initial begin
    #(40.0 * 40_000_000);
    failures++;
    $display("watchdog of the testbench expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scenario();
    report();
  end
endmodule
