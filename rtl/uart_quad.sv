// uart_quad: one UART FPGA of the SBC, four serial channels behind one chip
// select on the CPU bus.
//
// The CPU reaches the FPGA over the register bus with 8-bit data on the least
// significant byte lane. Word address bits 3..2 select the channel and bits
// 1..0 the register in it (see uart_channel); every register is on a 4-byte
// aligned CPU address. rd and wr are one-cycle strobes qualified by cs; read
// data is valid the cycle after rd. irq is the OR of the channels' interrupt
// requests (only a full-duplex channel raises one).
//
// Each channel's transmit line drives both the primary (P) and the redundant
// (R) RS-422 driver, and the two receive lines are merged into one: with both
// lines idling high, their AND lets a start bit on either line through. The
// P/R pairs come from the interface diagram; the merging rule is this
// design's own choice. Four UARTs per FPGA and the 2 KB buffer per channel
// follow the design description; bit rates come from the BAUD_DIV parameters
// (clock cycles per bit) and the full-duplex channel from FULL_DUPLEX.
module uart_quad #(
  parameter int unsigned BAUD_DIV0   = 1302,  // 25 MHz / 19200 bit/s
  parameter int unsigned BAUD_DIV1   = 1302,
  parameter int unsigned BAUD_DIV2   = 1302,
  parameter int unsigned BAUD_DIV3   = 1302,
  parameter int unsigned DEPTH       = 2048,
  parameter logic [3:0]  FULL_DUPLEX = 4'b0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  sbc_pkg::reg_req_t req,
  output logic [7:0]        rdata,
  output logic              irq,
  output logic [3:0]        tx_p,
  output logic [3:0]        tx_r,
  input  logic [3:0]        rx_p,
  input  logic [3:0]        rx_r
);
  localparam int unsigned DIVS [4] = '{BAUD_DIV0, BAUD_DIV1, BAUD_DIV2, BAUD_DIV3};

  logic [3:0]      ch_irq, ch_txd;
  logic [7:0]      ch_rdata [4];
  logic [1:0]      rd_ch;

  for (genvar i = 0; i < 4; i++) begin : g_ch
    logic sel;
    assign sel = cs && (req.addr[3:2] == 2'(i));
    uart_channel #(
      .BAUD_DIV(DIVS[i]), .DEPTH(DEPTH), .FULL_DUPLEX(FULL_DUPLEX[i])
    ) u_ch (
      .clk, .rst_n,
      .rd(req.rd && sel), .wr(req.wr && sel), .reg_sel(req.addr[1:0]),
      .wdata(req.wdata[7:0]), .rdata(ch_rdata[i]),
      .irq(ch_irq[i]), .txd(ch_txd[i]), .rxd(rx_p[i] & rx_r[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rd_ch <= '0;
    else if (cs && req.rd) rd_ch <= req.addr[3:2];
  end

  assign rdata = ch_rdata[rd_ch];
  assign irq   = |ch_irq;
  assign tx_p  = ch_txd;
  assign tx_r  = ch_txd;
endmodule
