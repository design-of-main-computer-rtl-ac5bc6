// tb_uart_quad: self-checking test of one UART FPGA: channel addressing on
// the register bus, different bit rates per channel, the primary/redundant
// line pairs (transmit on both, receive from either), and the interrupt of
// the full-duplex channel.
module tb_uart_quad;
  import sbc_pkg::*;
  localparam int D0 = 16, D1 = 24, D2 = 16, D3 = 20;
  localparam int DIVS [4] = '{D0, D1, D2, D3};
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cs = 0;
  reg_req_t req = '0;
  logic [7:0] rdata;
  logic [31:0] d;
  logic irq;
  logic [3:0] tx_p, tx_r, rx_p = '1, rx_r = '1;

  uart_quad #(.BAUD_DIV0(D0), .BAUD_DIV1(D1), .BAUD_DIV2(D2), .BAUD_DIV3(D3),
              .DEPTH(32), .FULL_DUPLEX(4'b1000)) dut (.*);
  `include "tb_reg_tasks.svh"

  initial begin repeat (100000) @(posedge clk); failures++; finish_tb(); end

  function automatic logic [5:0] ra(input int ch, input logic [1:0] r);
    return {2'b00, 2'(ch), r};
  endfunction

  task automatic get_frame(input int ch, output logic [7:0] b, output int len);
    int t;
    while (tx_p[ch] !== 1'b0) @(posedge clk);
    check(tx_r[ch] == 1'b0, "redundant line follows primary");
    t = 0;
    repeat (DIVS[ch] / 2) begin @(posedge clk); t++; end
    for (int i = 0; i < 8; i++) begin
      repeat (DIVS[ch]) begin @(posedge clk); t++; end
      b[i] = tx_p[ch];
    end
    repeat (DIVS[ch]) begin @(posedge clk); t++; end
    len = t + DIVS[ch] / 2;
  endtask

  task automatic put_frame(input int ch, input logic [7:0] b, input bit on_r);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (on_r) rx_r[ch] <= f[i]; else rx_p[ch] <= f[i];
      repeat (DIVS[ch]) @(posedge clk);
    end
    repeat (2) @(posedge clk);
  endtask

  logic [7:0] b;
  int len;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    // each channel sends its own byte at its own rate
    for (int ch = 0; ch < 3; ch++) begin
      reg_wr(ra(ch, UREG_DATA), 32'(8'h40 + ch));
      reg_wr(ra(ch, UREG_CTRL), 32'h1);
      get_frame(ch, b, len);
      check(b == 8'(8'h40 + ch), $sformatf("channel %0d byte", ch));
      check(len == 10 * DIVS[ch], $sformatf("channel %0d frame length %0d", ch, len));
    end
    check(tx_p[3] == 1'b1, "channel 3 idle");
    // receive on channel 1 via the redundant line, channel 2 via primary
    reg_wr(ra(1, UREG_CTRL), 32'h2);
    reg_wr(ra(2, UREG_CTRL), 32'h2);
    put_frame(1, 8'h9C, 1'b1);
    put_frame(2, 8'h63, 1'b0);
    reg_rd(ra(1, UREG_COUNT), d); check(d[7:0] == 8'd1, "channel 1 count");
    reg_rd(ra(2, UREG_COUNT), d); check(d[7:0] == 8'd1, "channel 2 count");
    reg_rd(ra(0, UREG_COUNT), d); check(d[7:0] == 8'd0, "channel 0 count");
    reg_rd(ra(1, UREG_DATA), d);  check(d[7:0] == 8'h9C, "channel 1 data from R line");
    reg_rd(ra(2, UREG_DATA), d);  check(d[7:0] == 8'h63, "channel 2 data from P line");
    // full duplex channel 3 interrupt
    check(!irq, "no irq");
    reg_wr(ra(3, UREG_CTRL), 32'hA);
    put_frame(3, 8'hE1, 1'b0);
    check(irq, "channel 3 irq");
    reg_rd(ra(3, UREG_DATA), d);  check(d[7:0] == 8'hE1, "channel 3 data");
    @(negedge clk); check(!irq, "irq cleared");
    finish_tb();
  end
endmodule
