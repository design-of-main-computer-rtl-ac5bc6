// sbc_top: the logic of the single board computer (SBC) that controls the
// multi-spectral camera payload: one interfacing FPGA and two UART FPGAs, as
// they are wired on the board.
//
// Outside this logic, and brought out as ports: the 80486DX2 CPU bus, the
// 2 MB SRAM and 1 MB flash chips, the 16-bit MIL-STD-1553 remote terminal
// device (host side only; its bus side with transformers is outside), the
// RS-422 drivers of the eight serial channels (primary and redundant line of
// each), the open-collector discrete circuits and the LVDS drivers to the
// NUC board.
//
// Serial channels, in order: 1 camera electronics (EOS/CEU), 2 DCSU, 3 CCU,
// 4 THTM, 5 NUC, 6 APDE, 7 EGSE, 8 host (software development). Channels
// 1..4 sit in the first UART FPGA, 5..8 in the second. Bit rates come from
// the interface diagram: 19200 bit/s, 56400 bit/s for APDE; the EGSE and host
// rates are not given and are set to 19200 bit/s here. Channel 8 is the full
// duplex, interrupt-driven one; the rest are half duplex and polled.
//
// One 25 MHz clock runs everything and is also sent to the NUC (nuc_clk).
// All logic is reset by the reset generator inside the interfacing FPGA.
module sbc_top
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
  parameter int unsigned RESET_STRETCH  = 16,
  parameter int unsigned FIFO_DEPTH     = 2048,
  parameter int unsigned DIV_19200      = 1302,   // 25 MHz / 19200
  parameter int unsigned DIV_56400      = 443     // 25 MHz / 56400
) (
  input  logic        clk,
  input  logic        por_n,
  // 80486 local bus
  input  logic        cpu_ads_n,
  input  logic        cpu_mio,
  input  logic        cpu_wr,
  input  logic [31:2] cpu_addr,
  input  logic [3:0]  cpu_be_n,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_rdy_n,
  output logic        cpu_intr,
  output logic        cpu_reset,
  // SRAM chips
  output logic [18:0] sram_addr,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic [3:0]  sram_we_n,
  output logic [31:0] sram_wdata,
  input  logic [31:0] sram_rdata,
  // flash chips
  output logic [16:0] flash_addr,
  output logic [1:0]  flash_ce_n,
  output logic        flash_oe_n,
  output logic [3:0]  flash_we_n,
  output logic [31:0] flash_wdata,
  input  logic [31:0] flash_rdata,
  // 1553 device, host side
  output logic [11:0] b1553_addr,
  output logic        b1553_cs_n,
  output logic        b1553_strb_n,
  output logic        b1553_rd_wr,
  output logic [15:0] b1553_wdata,
  input  logic [15:0] b1553_rdata,
  input  logic        b1553_ready_n,
  // RS-422 drivers, channel 1 is bit 0
  output logic [7:0]  ch_tx_p,
  output logic [7:0]  ch_tx_r,
  input  logic [7:0]  ch_rx_p,
  input  logic [7:0]  ch_rx_r,
  // spacecraft discretes
  input  logic        sc_reset,
  input  logic        sc_safe_hold,
  input  logic        sc_time_mark,
  input  logic        sc_pmu_active,
  input  logic        sc_spare,
  output logic        pmu_status,
  output logic        thtm_sel,
  output logic [2:0]  tlm,
  output logic        spare_out,
  // LVDS lines to the NUC
  output logic        nuc_clk,
  output logic        nuc_tm,
  output logic        nuc_stph
);
  logic       rst_n;
  logic [1:0] uart_cs;
  reg_req_t   uart_req;
  logic [7:0] uart_rdata [2];
  logic [1:0] uart_irq;

  sbc_ifpga #(
    .SRAM_WS(SRAM_WS), .FLASH_WS(FLASH_WS), .UART_WS(UART_WS), .REG_WS(REG_WS),
    .B1553_TIMEOUT(B1553_TIMEOUT), .WDT_TIMEOUT(WDT_TIMEOUT),
    .TIMER_RELOAD(TIMER_RELOAD), .DISC_FILTER(DISC_FILTER),
    .RESET_STRETCH(RESET_STRETCH)
  ) u_ifpga (
    .clk, .por_n, .rst_n,
    .ads_n(cpu_ads_n), .mio(cpu_mio), .wr(cpu_wr), .addr(cpu_addr),
    .be_n(cpu_be_n), .wdata(cpu_wdata), .rdata(cpu_rdata), .rdy_n(cpu_rdy_n),
    .cpu_intr, .cpu_reset,
    .sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_wdata, .sram_rdata,
    .flash_addr, .flash_ce_n, .flash_oe_n, .flash_we_n, .flash_wdata, .flash_rdata,
    .b_addr(b1553_addr), .b_cs_n(b1553_cs_n), .b_strb_n(b1553_strb_n),
    .b_rd_wr(b1553_rd_wr), .b_wdata(b1553_wdata), .b_rdata(b1553_rdata),
    .b_ready_n(b1553_ready_n),
    .uart_cs, .uart_req, .uart_rdata, .host_uart_irq(uart_irq[1]),
    .sc_reset, .sc_safe_hold, .sc_time_mark, .sc_pmu_active, .sc_spare,
    .pmu_status, .thtm_sel, .tlm, .spare_out,
    .nuc_tm, .nuc_stph
  );

  // channels 1..4: EOS, DCSU, CCU, THTM
  uart_quad #(
    .BAUD_DIV0(DIV_19200), .BAUD_DIV1(DIV_19200),
    .BAUD_DIV2(DIV_19200), .BAUD_DIV3(DIV_19200),
    .DEPTH(FIFO_DEPTH), .FULL_DUPLEX(4'b0000)
  ) u_uart0 (
    .clk, .rst_n, .cs(uart_cs[0]), .req(uart_req), .rdata(uart_rdata[0]),
    .irq(uart_irq[0]),
    .tx_p(ch_tx_p[3:0]), .tx_r(ch_tx_r[3:0]), .rx_p(ch_rx_p[3:0]), .rx_r(ch_rx_r[3:0])
  );

  // channels 5..8: NUC, APDE, EGSE, host (full duplex)
  uart_quad #(
    .BAUD_DIV0(DIV_19200), .BAUD_DIV1(DIV_56400),
    .BAUD_DIV2(DIV_19200), .BAUD_DIV3(DIV_19200),
    .DEPTH(FIFO_DEPTH), .FULL_DUPLEX(4'b1000)
  ) u_uart1 (
    .clk, .rst_n, .cs(uart_cs[1]), .req(uart_req), .rdata(uart_rdata[1]),
    .irq(uart_irq[1]),
    .tx_p(ch_tx_p[7:4]), .tx_r(ch_tx_r[7:4]), .rx_p(ch_rx_p[7:4]), .rx_r(ch_rx_r[7:4])
  );

  assign nuc_clk = clk;
endmodule
