// tb_uart_channel: self-checking test of one serial channel, in both modes.
// A half-duplex channel: the CPU side loads a command into the buffer,
// starts it, and the serial frames seen on txd are decoded and compared,
// including the 10-bit frame length; then a reply is sent into rxd and read
// back through the byte counter and send/receive registers; an overrun, a
// framing error and the status byte are checked. A full-duplex channel:
// automatic transmission, receive interrupt and byte counter.
module tb_uart_channel;
  import sbc_pkg::*;
  localparam int DIV   = 16;
  localparam int DEPTH = 64;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // two channels: [0] half duplex, [1] full duplex
  logic [1:0] rd, wr;
  logic [1:0] reg_sel;
  logic [7:0] wdata;
  logic [7:0] rdata [2];
  logic [1:0] irq, txd, rxd;

  uart_channel #(.BAUD_DIV(DIV), .DEPTH(DEPTH), .FULL_DUPLEX(1'b0)) u_hd (
    .clk, .rst_n, .rd(rd[0]), .wr(wr[0]), .reg_sel, .wdata, .rdata(rdata[0]),
    .irq(irq[0]), .txd(txd[0]), .rxd(rxd[0]));
  uart_channel #(.BAUD_DIV(DIV), .DEPTH(DEPTH), .FULL_DUPLEX(1'b1)) u_fd (
    .clk, .rst_n, .rd(rd[1]), .wr(wr[1]), .reg_sel, .wdata, .rdata(rdata[1]),
    .irq(irq[1]), .txd(txd[1]), .rxd(rxd[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic reg_wr(input int ch, input logic [1:0] r, input logic [7:0] d);
    @(posedge clk);
    wr[ch] <= 1; reg_sel <= r; wdata <= d;
    @(posedge clk);
    wr[ch] <= 0;
  endtask

  task automatic reg_rd(input int ch, input logic [1:0] r, output logic [7:0] d);
    @(posedge clk);
    rd[ch] <= 1; reg_sel <= r;
    @(posedge clk);
    rd[ch] <= 0;
    @(negedge clk);
    d = rdata[ch];
  endtask

  // receive one frame from a txd line, measuring its length
  task automatic get_frame(input int ch, output logic [7:0] d, output int len);
    int t0;
    while (txd[ch] !== 1'b0) @(posedge clk);
    t0 = 0;
    repeat (DIV / 2) begin @(posedge clk); t0++; end
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) begin @(posedge clk); t0++; end
      d[i] = txd[ch];
    end
    repeat (DIV) begin @(posedge clk); t0++; end
    check(txd[ch] == 1'b1, "stop bit high");
    len = t0 + DIV / 2;
  endtask

  // send one frame into rxd
  task automatic put_frame(input int ch, input logic [7:0] d, input logic stop = 1'b1);
    rxd[ch] <= 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd[ch] <= d[i];
      repeat (DIV) @(posedge clk);
    end
    rxd[ch] <= stop;
    repeat (DIV) @(posedge clk);
    rxd[ch] <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  logic [7:0] cmd [5] = '{8'hA1, 8'h00, 8'h5C, 8'hFF, 8'h3E};
  logic [7:0] got, st;
  int len;

  initial begin
    rd = 0; wr = 0; reg_sel = 0; wdata = 0; rxd = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---------------- half duplex: command out
    foreach (cmd[i]) reg_wr(0, UREG_DATA, cmd[i]);
    reg_rd(0, UREG_COUNT, got);
    check(got == 8'd5, "byte counter after load");
    check(txd[0] == 1'b1, "line idle before START");
    repeat (3 * DIV) @(posedge clk);
    check(txd[0] == 1'b1, "no transmission without START");
    reg_wr(0, UREG_CTRL, 8'h01);
    foreach (cmd[i]) begin
      get_frame(0, got, len);
      check(got == cmd[i], $sformatf("tx byte %0d", i));
      check(len == 10 * DIV, $sformatf("frame length %0d", len));
    end
    repeat (3 * DIV) @(posedge clk);
    reg_rd(0, UREG_CTRL, st);
    check(st[4] == 1'b0, "transmitter idle after buffer empty");
    reg_rd(0, UREG_COUNT, got);
    check(got == 8'd0, "buffer empty after transmission");

    // ---------------- half duplex: reply in
    put_frame(0, 8'h11);                       // RX disabled: ignored
    reg_rd(0, UREG_COUNT, got);
    check(got == 8'd0, "receiver off ignores input");
    reg_wr(0, UREG_CTRL, 8'h02);               // RX enable
    for (int i = 0; i < 4; i++) put_frame(0, 8'(8'h30 + i));
    reg_rd(0, UREG_COUNT, got);
    check(got == 8'd4, "byte counter after reply");
    for (int i = 0; i < 4; i++) begin
      reg_rd(0, UREG_DATA, got);
      check(got == 8'(8'h30 + i), $sformatf("rx byte %0d", i));
    end
    reg_rd(0, UREG_DATA, got);
    check(got == 8'h00, "read of empty buffer is 0");
    put_frame(0, 8'h77, 1'b0);                 // bad stop bit
    reg_rd(0, UREG_CTRL, st);
    check(st[6] == 1'b1 && st[7] == 1'b1, "framing error and RX enable in status");
    reg_wr(0, UREG_CTRL, 8'h06);               // clear, keep RX on
    reg_rd(0, UREG_CTRL, st);
    check(st == 8'h80, "status after clear");
    // fill to the top, one more overruns
    for (int i = 0; i < DEPTH; i++) reg_wr(0, UREG_DATA, 8'(i));
    put_frame(0, 8'h99);
    reg_rd(0, UREG_CTRL, st);
    check(st[5] == 1'b1, "overrun flag");
    check(st[3:0] == 4'(DEPTH >> 8), "count high bits in status");
    reg_rd(0, UREG_COUNT, got);
    check(got == 8'(DEPTH), "count low bits when full");

    // ---------------- full duplex
    reg_wr(1, UREG_CTRL, 8'h0A);               // RX and IRQ enable
    check(irq[1] == 1'b0, "no irq when empty");
    fork
      begin
        logic [7:0] g0, g1;
        int l0;
        reg_wr(1, UREG_DATA, 8'hC3);
        reg_wr(1, UREG_DATA, 8'h3C);
        get_frame(1, g0, l0);
        check(g0 == 8'hC3, "fd tx byte 0 started by itself");
        get_frame(1, g1, l0);
        check(g1 == 8'h3C, "fd tx byte 1");
      end
      put_frame(1, 8'h5A);
    join
    @(negedge clk);
    check(irq[1] == 1'b1, "rx interrupt");
    reg_rd(1, UREG_COUNT, got);
    check(got == 8'd1, "fd byte counter");
    reg_rd(1, UREG_DATA, got);
    check(got == 8'h5A, "fd rx data");
    @(negedge clk);
    check(irq[1] == 1'b0, "irq drops when read");
    check(irq[0] == 1'b0, "half-duplex channel never interrupts");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
