// tb_sbc_top: end-to-end test of the whole SBC logic at reduced sizes: bit
// periods of 16 and 12 clocks instead of 1302 and 443, a 20000-cycle
// watch-dog and a 300-cycle timer tick, so every mechanism (watch-dog reset
// included) is exercised in a short simulation. The scenario is in
// tb_sbc_body.svh.
module tb_sbc_top;
  localparam int DIV19      = 16;
  localparam int DIV56      = 12;
  localparam int WDT_TO     = 20000;
  localparam int TMR_RELOAD = 300;
  localparam bit RUN_WDT    = 1'b1;

  `include "tb_sbc_body.svh"

  sbc_top #(
    .WDT_TIMEOUT(WDT_TO), .TIMER_RELOAD(TMR_RELOAD),
    .DIV_19200(DIV19), .DIV_56400(DIV56)
  ) dut (.*);

  initial begin
    #(40 * 400000);
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
