// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop bit.
//
// When idle (ready high) a byte offered with valid is taken and sent least
// significant bit first after a low start bit, each bit lasting BAUD_DIV
// clock cycles, followed by a high stop bit; the line idles high. ready goes
// high again in the cycle after the stop bit ends, so a byte takes
// 10 x BAUD_DIV cycles. The frame format is this design's choice; the design
// description gives only the bit rates.
module uart_tx #(
  parameter int unsigned BAUD_DIV = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(BAUD_DIV + 1);

  logic [CW-1:0] baud_cnt;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [8:0]    shreg;     // data bits then stop bit
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      txd      <= 1'b1;
      baud_cnt <= '0;
      bit_idx  <= '0;
      shreg    <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy     <= 1'b1;
        txd      <= 1'b0;               // start bit
        shreg    <= {1'b1, data};
        bit_idx  <= '0;
        baud_cnt <= CW'(BAUD_DIV - 1);
      end
    end else if (baud_cnt != 0) begin
      baud_cnt <= baud_cnt - 1'b1;
    end else if (bit_idx == 4'd9) begin
      busy <= 1'b0;
      txd  <= 1'b1;
    end else begin
      txd      <= shreg[0];
      shreg    <= {1'b1, shreg[8:1]};
      bit_idx  <= bit_idx + 1'b1;
      baud_cnt <= CW'(BAUD_DIV - 1);
    end
  end
endmodule
