// sbc_pkg: types and constants shared by the single board computer (SBC) logic.
//
// The SBC is an 80486 board whose glue logic sits in one interfacing FPGA and
// whose eight serial channels sit in two quad-UART FPGAs. This package holds
// the memory map that the interfacing FPGA decodes, the register bus that
// links the bus controller to the register blocks and to the UART FPGAs, and
// the interrupt numbering of the interrupt controller.
//
// From the design description: 25 MHz bus clock, 2 MB SRAM, 1 MB flash, a
// 4K-word window into the 1553 device, eight UARTs with 2 KB buffers and three
// registers each on 4-byte aligned addresses, 32-bit timer. The addresses,
// register layouts, interrupt numbers and wait states are this design's own.
package sbc_pkg;

  localparam int unsigned CLK_HZ = 25_000_000;

  // ---------------------------------------------------------------- memory map
  // Flash sits at the top of the 4 GB space so the 486 reset vector
  // (0xFFFF_FFF0) fetches from it.
  localparam logic [31:0] SRAM_BASE  = 32'h0000_0000;  // 2 MB
  localparam logic [31:0] FLASH_BASE = 32'hFFF0_0000;  // 1 MB
  localparam logic [31:0] B1553_BASE = 32'h8000_0000;  // 4K words x 4 bytes
  localparam logic [31:0] UART0_BASE = 32'h8001_0000;  // channels 1..4
  localparam logic [31:0] UART1_BASE = 32'h8001_0040;  // channels 5..8
  localparam logic [31:0] REGS_BASE  = 32'h8002_0000;  // internal registers

  typedef enum logic [2:0] {
    TGT_NONE,
    TGT_SRAM,
    TGT_FLASH,
    TGT_1553,
    TGT_UART0,
    TGT_UART1,
    TGT_REGS
  } target_e;

  // Decode a 486 bus cycle (address bits 31..2 and M/IO#) to a target.
  function automatic target_e decode(input logic mio, input logic [31:2] a);
    logic [31:0] ba;
    ba = {a, 2'b00};
    if (!mio)                                  return TGT_NONE;
    if (ba[31:21] == SRAM_BASE[31:21])         return TGT_SRAM;
    if (ba[31:20] == FLASH_BASE[31:20])        return TGT_FLASH;
    if (ba[31:14] == B1553_BASE[31:14])        return TGT_1553;
    if (ba[31:6]  == UART0_BASE[31:6])         return TGT_UART0;
    if (ba[31:6]  == UART1_BASE[31:6])         return TGT_UART1;
    if (ba[31:8]  == REGS_BASE[31:8])          return TGT_REGS;
    return TGT_NONE;
  endfunction

  // ---------------------------------------------------------- register bus
  // rd and wr are one-cycle strobes; addr is the 32-bit word index inside the
  // target; read data is registered and valid from the cycle after rd.
  typedef struct packed {
    logic        rd;
    logic        wr;
    logic [5:0]  addr;
    logic [31:0] wdata;
  } reg_req_t;

  // Internal register blocks: addr[5:2] picks the block, addr[1:0] the word.
  localparam logic [3:0] BLK_PIC   = 4'd0;
  localparam logic [3:0] BLK_WDT   = 4'd1;
  localparam logic [3:0] BLK_TIMER = 4'd2;
  localparam logic [3:0] BLK_DISC  = 4'd3;
  localparam logic [3:0] BLK_LVDS  = 4'd4;

  // UART channel registers (word index inside a channel)
  localparam logic [1:0] UREG_DATA  = 2'd0;  // send/receive
  localparam logic [1:0] UREG_COUNT = 2'd1;  // byte counter
  localparam logic [1:0] UREG_CTRL  = 2'd2;  // control (write) / status (read)

  // UART control register bits
  localparam int unsigned UCTRL_START  = 0;
  localparam int unsigned UCTRL_RXEN   = 1;
  localparam int unsigned UCTRL_CLEAR  = 2;
  localparam int unsigned UCTRL_IRQEN  = 3;

  localparam logic [7:0] WDT_KEY = 8'hA5;

  // ---------------------------------------------------------- interrupts
  localparam int unsigned NUM_IRQ      = 8;
  localparam int unsigned IRQ_TIMER    = 0;
  localparam int unsigned IRQ_TMARK    = 1;
  localparam int unsigned IRQ_SAFEHOLD = 2;
  localparam int unsigned IRQ_PMUACT   = 3;
  localparam int unsigned IRQ_HOSTUART = 4;
  localparam int unsigned IRQ_BUSERR   = 5;
  localparam int unsigned IRQ_SPARE    = 6;
  localparam int unsigned IRQ_UNUSED   = 7;

endpackage
