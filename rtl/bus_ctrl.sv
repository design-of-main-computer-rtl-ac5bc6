// bus_ctrl: address decoder and cycle controller of the interfacing FPGA.
//
// It follows the 80486 local bus in its simplest, non-burst form (the CPU
// cache is disabled on this board, so every cycle is a single transfer):
// the CPU drives ADS# low for one clock with the address, byte enables,
// W/R# and M/IO#, keeps write data valid until the cycle ends, and waits
// for RDY#. The controller decodes the address (memory map in sbc_pkg),
// runs the access on the selected device and returns RDY# low for one clock
// with the read data. A bus cycle lasts WS + 3 clocks from ADS#, WS being
// the target's wait states:
//   SRAM   2 MB in four 512K x 8 chips, one per byte lane; CE#, OE#, and one
//          WE# per lane from the byte enables; SRAM_WS wait states.
//   flash  1 MB in two banks of four 128K x 8 chips; one CE# per bank
//          (address bit 19); FLASH_WS wait states. Writes are passed on as
//          plain write cycles; the flash program command sequence is left to
//          software.
//   1553   16-bit device. Its address lines take the CPU address shifted by
//          one bit (device A0 = CPU A2), so each 16-bit device word sits on
//          a 4-byte aligned CPU address, in the low half of the data bus,
//          and no word swapping is needed; a 4K-word window is used. The
//          cycle holds CS# and STRB# until the device answers READY#; after
//          B1553_TIMEOUT clocks without it the cycle ends with all-ones read
//          data and bus_err pulses.
//   UART   two UART FPGAs, 8-bit data on the least significant byte lane,
//          one chip select each; UART_WS wait states.
//   regs   the FPGA's own register blocks; REG_WS wait states.
//   other  cycles to no device, and I/O cycles, end at once reading zero.
// For UART and register targets, req.rd/req.wr pulse in the first access
// clock and the registered read data is taken in the last one, so their
// wait states must be at least 1.
//
// From the design description: the decoder and the control of the RAM,
// flash and 1553 cycles inside the FPGA, the memory sizes and chip
// organisation, the one-bit shifted 1553 address and the byte-lane UART
// connection. The memory map, wait states, timeout and the handshake with
// the 1553 device are this design's own.
module bus_ctrl
  import sbc_pkg::*;
#(
  parameter int unsigned SRAM_WS       = 1,
  parameter int unsigned FLASH_WS      = 3,
  parameter int unsigned UART_WS       = 2,
  parameter int unsigned REG_WS        = 1,
  parameter int unsigned B1553_TIMEOUT = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // 80486 local bus
  input  logic        ads_n,
  input  logic        mio,        // 1 memory, 0 I/O
  input  logic        wr,         // W/R#: 1 write
  input  logic [31:2] addr,
  input  logic [3:0]  be_n,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rdy_n,
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
  output logic        b_rd_wr,    // 1 read
  output logic [15:0] b_wdata,
  input  logic [15:0] b_rdata,
  input  logic        b_ready_n,
  // UART FPGAs
  output logic [1:0]  uart_cs,
  output reg_req_t    uart_req,
  input  logic [7:0]  uart_rdata [2],
  // internal registers
  output logic        regs_cs,
  output reg_req_t    regs_req,
  input  logic [31:0] regs_rdata,
  // status
  output logic        bus_err
);
  typedef enum logic [1:0] { S_IDLE, S_ACC, S_DONE } state_e;

  localparam int unsigned WCW = $clog2(B1553_TIMEOUT + 1) > 4 ? $clog2(B1553_TIMEOUT + 1) : 4;

  state_e        state;
  target_e       tgt;
  logic [31:2]   a_q;
  logic [3:0]    be_q;
  logic          wr_q;
  logic [WCW-1:0] wcnt;
  logic          first;
  logic [31:0]   rdata_q;

  function automatic logic [WCW-1:0] waits(input target_e t);
    unique case (t)
      TGT_SRAM:               return WCW'(SRAM_WS);
      TGT_FLASH:              return WCW'(FLASH_WS);
      TGT_1553:               return WCW'(B1553_TIMEOUT);
      TGT_UART0, TGT_UART1:   return WCW'(UART_WS);
      TGT_REGS:               return WCW'(REG_WS);
      default:                return '0;
    endcase
  endfunction

  logic acc_end;   // last clock of the access phase
  always_comb begin
    if (tgt == TGT_1553) acc_end = !b_ready_n || wcnt == 0;
    else                 acc_end = wcnt == 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tgt     <= TGT_NONE;
      a_q     <= '0;
      be_q    <= '0;
      wr_q    <= 1'b0;
      wcnt    <= '0;
      first   <= 1'b0;
      rdata_q <= '0;
      bus_err <= 1'b0;
    end else begin
      bus_err <= 1'b0;
      first   <= 1'b0;
      unique case (state)
        S_IDLE: if (!ads_n) begin
          a_q     <= addr;
          be_q    <= ~be_n;
          wr_q    <= wr;
          tgt     <= decode(mio, addr);
          wcnt    <= waits(decode(mio, addr));
          rdata_q <= '0;
          first   <= 1'b1;
          state   <= (decode(mio, addr) == TGT_NONE) ? S_DONE : S_ACC;
        end
        S_ACC: begin
          if (wcnt != 0) wcnt <= wcnt - 1'b1;
          if (acc_end) begin
            state <= S_DONE;
            unique case (tgt)
              TGT_SRAM:  rdata_q <= sram_rdata;
              TGT_FLASH: rdata_q <= flash_rdata;
              TGT_1553: begin
                if (!b_ready_n) rdata_q <= {16'h0000, b_rdata};
                else begin
                  rdata_q <= '1;
                  bus_err <= 1'b1;
                end
              end
              TGT_UART0: rdata_q <= {24'h0, uart_rdata[0]};
              TGT_UART1: rdata_q <= {24'h0, uart_rdata[1]};
              TGT_REGS:  rdata_q <= regs_rdata;
              default:   rdata_q <= '0;
            endcase
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic acc;
  assign acc   = (state == S_ACC);
  assign rdy_n = (state != S_DONE);
  assign rdata = (state == S_DONE && !wr_q) ? rdata_q : '0;

  // SRAM: A20..A2 pick the 32-bit word, byte enables pick the lanes
  assign sram_addr  = a_q[20:2];
  assign sram_ce_n  = !(acc && tgt == TGT_SRAM);
  assign sram_oe_n  = !(acc && tgt == TGT_SRAM && !wr_q);
  assign sram_we_n  = (acc && tgt == TGT_SRAM && wr_q) ? ~be_q : 4'hF;
  assign sram_wdata = wdata;

  // flash: A18..A2 inside a chip, A19 picks the bank
  assign flash_addr  = a_q[18:2];
  assign flash_ce_n  = (acc && tgt == TGT_FLASH) ? (a_q[19] ? 2'b01 : 2'b10) : 2'b11;
  assign flash_oe_n  = !(acc && tgt == TGT_FLASH && !wr_q);
  assign flash_we_n  = (acc && tgt == TGT_FLASH && wr_q) ? ~be_q : 4'hF;
  assign flash_wdata = wdata;

  // 1553: address shifted by one bit, low data word only
  logic b_go;
  assign b_go     = acc && tgt == TGT_1553 && (!wr_q || |be_q[1:0]);
  assign b_addr   = a_q[13:2];
  assign b_cs_n   = !b_go;
  assign b_strb_n = !b_go;
  assign b_rd_wr  = !wr_q;
  assign b_wdata  = wdata[15:0];

  // UART FPGAs: word index A5..A2, data on D7..D0
  assign uart_cs[0]     = acc && tgt == TGT_UART0;
  assign uart_cs[1]     = acc && tgt == TGT_UART1;
  assign uart_req.rd    = acc && first && !wr_q && (tgt == TGT_UART0 || tgt == TGT_UART1);
  assign uart_req.wr    = acc && first && wr_q && be_q[0] && (tgt == TGT_UART0 || tgt == TGT_UART1);
  assign uart_req.addr  = a_q[7:2];
  assign uart_req.wdata = {24'h0, wdata[7:0]};

  // internal registers: word index A7..A2
  assign regs_cs        = acc && tgt == TGT_REGS;
  assign regs_req.rd    = acc && first && !wr_q && tgt == TGT_REGS;
  assign regs_req.wr    = acc && first && wr_q && tgt == TGT_REGS;
  assign regs_req.addr  = a_q[7:2];
  assign regs_req.wdata = wdata;
endmodule
