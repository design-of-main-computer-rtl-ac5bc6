// sbc_ifpga: the interfacing FPGA of the SBC, which holds the timing and
// logic between the 80486 and the board's other modules.
//
// It contains:
//   reset_gen    board reset from power-on, the spacecraft reset discrete
//                and the watch-dog; it also resets the UART FPGAs (rst_n out)
//   bus_ctrl     address decoder and cycle control for SRAM, flash, the 1553
//                device, the two UART FPGAs and the registers below
//   pic          interrupt controller driving the CPU's INTR
//   wdt          watch-dog timer
//   sys_timer    32-bit timer giving the operating system tick
//   discrete_io  spacecraft discretes in, status discretes out
//   lvds_ctrl    time-mark and start/stop photo lines to the NUC
// Register blocks sit at REGS_BASE + 16 x block number (sbc_pkg), four
// words each. Interrupt lines: 0 timer, 1 time-mark, 2 safe-hold, 3 PMU
// active change, 4 software-development UART, 5 1553 bus timeout, 6 spare
// discrete, 7 unused.
//
// The set of functions in this FPGA follows the design description; how
// they are split into modules, the registers and interrupt numbers are this
// design's own. Timing is that of the sub-blocks: one 25 MHz clock, a CPU
// bus cycle of WS + 3 clocks.
module sbc_ifpga
  import sbc_pkg::*;
#(
  parameter int unsigned SRAM_WS        = 1,
  parameter int unsigned FLASH_WS       = 3,
  parameter int unsigned UART_WS        = 2,
  parameter int unsigned REG_WS         = 1,
  parameter int unsigned B1553_TIMEOUT  = 64,
  parameter int unsigned WDT_TIMEOUT    = 25_000_000,
  parameter int unsigned TIMER_RELOAD   = 249_999,
  parameter int unsigned DISC_FILTER    = 4,
  parameter int unsigned RESET_STRETCH  = 16
) (
  input  logic        clk,
  input  logic        por_n,
  output logic        rst_n,
  // 80486
  input  logic        ads_n,
  input  logic        mio,
  input  logic        wr,
  input  logic [31:2] addr,
  input  logic [3:0]  be_n,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rdy_n,
  output logic        cpu_intr,
  output logic        cpu_reset,
  // SRAM
  output logic [18:0] sram_addr,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic [3:0]  sram_we_n,
  output logic [31:0] sram_wdata,
  input  logic [31:0] sram_rdata,
  // flash
  output logic [16:0] flash_addr,
  output logic [1:0]  flash_ce_n,
  output logic        flash_oe_n,
  output logic [3:0]  flash_we_n,
  output logic [31:0] flash_wdata,
  input  logic [31:0] flash_rdata,
  // 1553 device
  output logic [11:0] b_addr,
  output logic        b_cs_n,
  output logic        b_strb_n,
  output logic        b_rd_wr,
  output logic [15:0] b_wdata,
  input  logic [15:0] b_rdata,
  input  logic        b_ready_n,
  // UART FPGAs
  output logic [1:0]  uart_cs,
  output reg_req_t    uart_req,
  input  logic [7:0]  uart_rdata [2],
  input  logic        host_uart_irq,
  // discretes
  input  logic        sc_reset,
  input  logic        sc_safe_hold,
  input  logic        sc_time_mark,
  input  logic        sc_pmu_active,
  input  logic        sc_spare,
  output logic        pmu_status,
  output logic        thtm_sel,
  output logic [2:0]  tlm,
  output logic        spare_out,
  // to the LVDS drivers
  output logic        nuc_tm,
  output logic        nuc_stph
);
  logic        wdt_expire;
  logic [1:0]  reset_cause;
  logic        regs_cs;
  reg_req_t    regs_req;
  logic [31:0] regs_rdata;
  logic        bus_err;

  reset_gen #(.STRETCH(RESET_STRETCH)) u_rst (
    .clk, .por_n, .sc_reset, .wdt_expire, .rst_n, .cpu_reset, .cause(reset_cause)
  );

  bus_ctrl #(
    .SRAM_WS(SRAM_WS), .FLASH_WS(FLASH_WS), .UART_WS(UART_WS),
    .REG_WS(REG_WS), .B1553_TIMEOUT(B1553_TIMEOUT)
  ) u_bus (
    .clk, .rst_n,
    .ads_n, .mio, .wr, .addr, .be_n, .wdata, .rdata, .rdy_n,
    .sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_wdata, .sram_rdata,
    .flash_addr, .flash_ce_n, .flash_oe_n, .flash_we_n, .flash_wdata, .flash_rdata,
    .b_addr, .b_cs_n, .b_strb_n, .b_rd_wr, .b_wdata, .b_rdata, .b_ready_n,
    .uart_cs, .uart_req, .uart_rdata,
    .regs_cs, .regs_req, .regs_rdata,
    .bus_err
  );

  // register block selects
  logic [3:0] blk;
  logic       cs_pic, cs_wdt, cs_tmr, cs_disc, cs_lvds;
  assign blk     = regs_req.addr[5:2];
  assign cs_pic  = regs_cs && blk == BLK_PIC;
  assign cs_wdt  = regs_cs && blk == BLK_WDT;
  assign cs_tmr  = regs_cs && blk == BLK_TIMER;
  assign cs_disc = regs_cs && blk == BLK_DISC;
  assign cs_lvds = regs_cs && blk == BLK_LVDS;

  logic [31:0] rd_pic, rd_wdt, rd_tmr, rd_disc, rd_lvds;
  always_comb begin
    unique case (blk)
      BLK_PIC:   regs_rdata = rd_pic;
      BLK_WDT:   regs_rdata = rd_wdt;
      BLK_TIMER: regs_rdata = rd_tmr;
      BLK_DISC:  regs_rdata = rd_disc;
      BLK_LVDS:  regs_rdata = rd_lvds;
      default:   regs_rdata = '0;
    endcase
  end

  logic tick, ev_sh, ev_tm, ev_pmu, ev_spare, time_mark;
  logic [NUM_IRQ-1:0] irq_src;

  always_comb begin
    irq_src               = '0;
    irq_src[IRQ_TIMER]    = tick;
    irq_src[IRQ_TMARK]    = ev_tm;
    irq_src[IRQ_SAFEHOLD] = ev_sh;
    irq_src[IRQ_PMUACT]   = ev_pmu;
    irq_src[IRQ_HOSTUART] = host_uart_irq;
    irq_src[IRQ_BUSERR]   = bus_err;
    irq_src[IRQ_SPARE]    = ev_spare;
  end

  pic #(.NUM_IRQ(NUM_IRQ)) u_pic (
    .clk, .rst_n, .cs(cs_pic), .req(regs_req), .rdata(rd_pic),
    .src(irq_src), .intr(cpu_intr)
  );

  wdt #(.TIMEOUT(WDT_TIMEOUT)) u_wdt (
    .clk, .rst_n, .cs(cs_wdt), .req(regs_req), .rdata(rd_wdt), .expire(wdt_expire)
  );

  sys_timer #(.DEFAULT_RELOAD(TIMER_RELOAD)) u_tmr (
    .clk, .rst_n, .cs(cs_tmr), .req(regs_req), .rdata(rd_tmr), .tick
  );

  discrete_io #(.FILTER(DISC_FILTER)) u_disc (
    .clk, .rst_n, .cs(cs_disc), .req(regs_req), .rdata(rd_disc),
    .sc_safe_hold, .sc_time_mark, .sc_pmu_active, .sc_spare, .reset_cause,
    .ev_safe_hold(ev_sh), .ev_time_mark(ev_tm), .ev_pmu_active(ev_pmu),
    .ev_spare, .time_mark, .pmu_status, .thtm_sel, .tlm, .spare_out
  );

  lvds_ctrl u_lvds (
    .clk, .rst_n, .cs(cs_lvds), .req(regs_req), .rdata(rd_lvds),
    .time_mark, .nuc_tm, .nuc_stph
  );
endmodule
