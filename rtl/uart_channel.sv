// uart_channel: one serial channel of the SBC, a UART with its 2 KB buffer and
// the three registers the software sees.
//
// Registers (word index on reg_sel, data on the low byte only):
//   0 send/receive  write: put a byte into the buffer; read: take the oldest
//                   received byte out of it (0 when empty)
//   1 byte counter  read: bytes waiting in the buffer, bits 7..0
//   2 control       write: bit0 START transmission, bit1 RX enable,
//                   bit2 CLEAR buffer and error flags, bit3 IRQ enable
//                   read (status): bits 3..0 byte count bits 11..8,
//                   bit4 transmitter busy, bit5 overrun, bit6 framing error,
//                   bit7 RX enable
// rd and wr are one-cycle strobes; rdata is registered and valid from the
// cycle after rd, and stays until the next rd.
//
// Half duplex (FULL_DUPLEX = 0), the command/telemetry channels: the software
// fills the single DEPTH-byte buffer and writes START; the transmitter then
// sends bytes until the buffer is empty, without further CPU help. While the
// transmitter is idle and RX is enabled, received bytes go into the same
// buffer and the software polls the byte counter: the SBC is master of the
// exchange, so no interrupt is used. This follows the design description; the
// sharing of one buffer by both directions is this design's reading of it.
//
// Full duplex (FULL_DUPLEX = 1), the software development channel: the buffer
// is split into a DEPTH/2 transmit and a DEPTH/2 receive part, the
// transmitter starts by itself whenever its part holds data, and irq is high
// while the receive part holds data and IRQ is enabled. Interrupt-driven full
// duplex operation follows the description; the split is this design's own.
module uart_channel #(
  parameter int unsigned BAUD_DIV    = 1302,
  parameter int unsigned DEPTH       = 2048,
  parameter bit          FULL_DUPLEX = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd,
  input  logic       wr,
  input  logic [1:0] reg_sel,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq,
  output logic       txd,
  input  logic       rxd
);
  import sbc_pkg::*;

  localparam int unsigned FDEPTH = FULL_DUPLEX ? DEPTH / 2 : DEPTH;
  localparam int unsigned CNTW   = $clog2(FDEPTH) + 1;

  // register strobes
  logic wr_data, rd_data, wr_ctrl;
  assign wr_data = wr && (reg_sel == UREG_DATA);
  assign rd_data = rd && (reg_sel == UREG_DATA);
  assign wr_ctrl = wr && (reg_sel == UREG_CTRL);

  logic clear;
  assign clear = wr_ctrl && wdata[UCTRL_CLEAR];

  // serial engines
  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic       rx_valid, rx_ferr;
  logic [7:0] rx_data;

  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd
  );
  uart_rx #(.BAUD_DIV(BAUD_DIV)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .frame_err(rx_ferr), .data(rx_data)
  );

  logic rx_en, irq_en, overrun, ferr;
  logic tx_busy;
  logic lost;                    // a received byte could not be stored
  logic [CNTW-1:0] cpu_count;    // what the byte counter shows
  logic [7:0]      cpu_head;     // what a data read returns
  logic            cpu_empty;

  if (FULL_DUPLEX) begin : g_fd
    logic [7:0]      tq_head, rq_head;
    logic [CNTW-1:0] tq_count, rq_count;
    logic            tq_empty, tq_full, rq_empty, rq_full;

    assign tx_valid = !tq_empty;
    assign tx_data  = tq_head;

    sync_fifo #(.WIDTH(8), .DEPTH(FDEPTH)) u_txq (
      .clk, .rst_n, .clear,
      .push(wr_data), .wdata(wdata),
      .pop(tx_ready && !tq_empty), .rdata(tq_head),
      .count(tq_count), .empty(tq_empty), .full(tq_full)
    );
    sync_fifo #(.WIDTH(8), .DEPTH(FDEPTH)) u_rxq (
      .clk, .rst_n, .clear,
      .push(rx_valid && rx_en), .wdata(rx_data),
      .pop(rd_data), .rdata(rq_head),
      .count(rq_count), .empty(rq_empty), .full(rq_full)
    );

    assign lost      = rx_valid && rx_en && rq_full;
    assign tx_busy   = !tq_empty || !tx_ready;
    assign cpu_count = rq_count;
    assign cpu_head  = rq_head;
    assign cpu_empty = rq_empty;
    assign irq       = irq_en && !rq_empty;
  end else begin : g_hd
    logic [7:0]      q_head;
    logic [CNTW-1:0] q_count;
    logic            q_empty, q_full;
    logic            tx_active;
    logic            rx_push, tx_take;

    // the CPU has priority on both ends of the shared buffer
    assign rx_push  = rx_valid && rx_en && !tx_active && !wr_data;
    assign tx_take  = tx_active && tx_ready && !q_empty && !rd_data;
    assign tx_valid = tx_take;
    assign tx_data  = q_head;

    sync_fifo #(.WIDTH(8), .DEPTH(FDEPTH)) u_q (
      .clk, .rst_n, .clear,
      .push(wr_data || rx_push), .wdata(wr_data ? wdata : rx_data),
      .pop(rd_data || tx_take), .rdata(q_head),
      .count(q_count), .empty(q_empty), .full(q_full)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                tx_active <= 1'b0;
      else if (clear)                            tx_active <= 1'b0;
      else if (wr_ctrl && wdata[UCTRL_START])    tx_active <= 1'b1;
      else if (tx_active && q_empty && tx_ready) tx_active <= 1'b0;
    end

    assign lost      = rx_valid && rx_en && !tx_active && (q_full || wr_data);
    assign tx_busy   = tx_active || !tx_ready;
    assign cpu_count = q_count;
    assign cpu_head  = q_head;
    assign cpu_empty = q_empty;
    assign irq       = 1'b0;     // polled channel
  end

  logic [11:0] count12;
  assign count12 = 12'(cpu_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_en   <= 1'b0;
      irq_en  <= 1'b0;
      overrun <= 1'b0;
      ferr    <= 1'b0;
      rdata   <= '0;
    end else begin
      if (wr_ctrl) begin
        rx_en  <= wdata[UCTRL_RXEN];
        irq_en <= wdata[UCTRL_IRQEN];
      end
      if (clear) begin
        overrun <= 1'b0;
        ferr    <= 1'b0;
      end else begin
        if (lost)             overrun <= 1'b1;
        if (rx_ferr && rx_en) ferr    <= 1'b1;
      end
      if (rd) begin
        unique case (reg_sel)
          UREG_DATA:  rdata <= cpu_empty ? 8'h00 : cpu_head;
          UREG_COUNT: rdata <= count12[7:0];
          UREG_CTRL:  rdata <= {rx_en, ferr, overrun, tx_busy, count12[11:8]};
          default:    rdata <= 8'h00;
        endcase
      end
    end
  end
endmodule
