// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The line is brought into the clock domain by two flip-flops. A falling edge
// starts a frame; the start bit is checked half a bit later and each further
// bit is sampled in its middle, BAUD_DIV clock cycles apart, least
// significant bit first. At the middle of the stop bit the byte is offered on
// data with a one-cycle valid pulse, and frame_err pulses instead if the stop
// bit is low. A start bit that is no longer low at its middle is taken as a
// glitch and ignored. Frame format and sampling method are this design's own.
module uart_rx #(
  parameter int unsigned BAUD_DIV = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic       frame_err,
  output logic [7:0] data
);
  localparam int unsigned CW = $clog2(BAUD_DIV + 1);

  logic          rx_s1, rx_s2, rx_prev;
  logic [CW-1:0] baud_cnt;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1     <= 1'b1;
      rx_s2     <= 1'b1;
      rx_prev   <= 1'b1;
      busy      <= 1'b0;
      baud_cnt  <= '0;
      bit_idx   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rx_s1     <= rxd;
      rx_s2     <= rx_s1;
      rx_prev   <= rx_s2;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (!busy) begin
        if (rx_prev && !rx_s2) begin
          busy     <= 1'b1;
          bit_idx  <= '0;
          baud_cnt <= CW'(BAUD_DIV / 2 - 1);
        end
      end else if (baud_cnt != 0) begin
        baud_cnt <= baud_cnt - 1'b1;
      end else begin
        baud_cnt <= CW'(BAUD_DIV - 1);
        bit_idx  <= bit_idx + 1'b1;
        if (bit_idx == 4'd0) begin
          if (rx_s2) busy <= 1'b0;          // glitch, not a start bit
        end else if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          if (rx_s2) valid     <= 1'b1;
          else       frame_err <= 1'b1;
        end else begin
          data <= {rx_s2, data[7:1]};
        end
      end
    end
  end
endmodule
