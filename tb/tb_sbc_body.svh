// Shared body of the whole-board testbenches. The including module declares
// the localparams DIV19, DIV56 (clock cycles per bit at 19200 and 56400
// bit/s), WDT_TO (watch-dog timeout), TMR_RELOAD and RUN_WDT (whether to
// wait for the watch-dog to expire), and instantiates sbc_top as dut with
// the signals declared here.
//
// It plays the software of the board on the behavioural CPU: boot from the
// flash, copy to SRAM, poll the 1553 device for a command and post
// telemetry, run a command/reply exchange with the camera electronics
// (EOS, channel 1) and the APDE (channel 6, faster rate), fill the DCSU
// channel buffer to its full 2 KB, reprogram part of the flash with bytes
// that arrive on the EGSE channel, take interrupts
// from the host UART, the timer and the spacecraft discretes, drive the NUC
// lines and discrete outputs, and finally let the watch-dog and the
// spacecraft reset discrete reset the board. Serial peers and the
// spacecraft are played by the testbench. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
import sbc_pkg::*;

logic clk = 1'b0;
always #20 clk = ~clk;                 // 25 MHz
logic por_n = 1'b1;
initial #1 por_n = 1'b0;          // a falling edge, so the reset acts at once
int checks = 0, failures = 0;

logic        cpu_ads_n, cpu_mio, cpu_wr, cpu_rdy_n, cpu_intr, cpu_reset;
logic [31:2] cpu_addr;
logic [3:0]  cpu_be_n;
logic [31:0] cpu_wdata, cpu_rdata;
logic [18:0] sram_addr;  logic sram_ce_n, sram_oe_n; logic [3:0] sram_we_n;
logic [31:0] sram_wdata, sram_rdata;
logic [16:0] flash_addr; logic [1:0] flash_ce_n; logic flash_oe_n; logic [3:0] flash_we_n;
logic [31:0] flash_wdata, flash_rdata, f0_rdata, f1_rdata;
logic [11:0] b1553_addr; logic b1553_cs_n, b1553_strb_n, b1553_rd_wr, b1553_ready_n;
logic [15:0] b1553_wdata, b1553_rdata;
logic [7:0]  ch_tx_p, ch_tx_r;
logic [7:0]  ch_rx_p = '1, ch_rx_r = '1;
logic        sc_reset = 0, sc_safe_hold = 0, sc_time_mark = 0, sc_pmu_active = 0, sc_spare = 0;
logic        pmu_status, thtm_sel, spare_out, nuc_clk, nuc_tm, nuc_stph;
logic [2:0]  tlm;

tb_cpu486_model cpu (.clk, .ads_n(cpu_ads_n), .mio(cpu_mio), .wr(cpu_wr), .addr(cpu_addr),
  .be_n(cpu_be_n), .wdata(cpu_wdata), .rdata(cpu_rdata), .rdy_n(cpu_rdy_n));
tb_mem_model #(.AW(19)) sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
  .we_n(sram_we_n), .wdata(sram_wdata), .rdata(sram_rdata));
tb_mem_model #(.AW(17)) fl0 (.clk, .addr(flash_addr), .ce_n(flash_ce_n[0]), .oe_n(flash_oe_n),
  .we_n(flash_we_n), .wdata(flash_wdata), .rdata(f0_rdata));
tb_mem_model #(.AW(17)) fl1 (.clk, .addr(flash_addr), .ce_n(flash_ce_n[1]), .oe_n(flash_oe_n),
  .we_n(flash_we_n), .wdata(flash_wdata), .rdata(f1_rdata));
assign flash_rdata = f0_rdata | f1_rdata;
tb_b1553_model #(.LATENCY(3)) rt (.clk, .addr(b1553_addr), .cs_n(b1553_cs_n),
  .strb_n(b1553_strb_n), .rd_wr(b1553_rd_wr), .wdata(b1553_wdata), .rdata(b1553_rdata),
  .ready_n(b1553_ready_n));

// --------------------------------------------------------------- mechanisms
typedef enum int {
  M_FLASH_BOOT, M_SRAM, M_1553, M_1553_TIMEOUT, M_UART_CMD, M_UART_REPLY,
  M_UART_56400, M_BUF_2K, M_FLASH_PROG, M_HOST_IRQ, M_TIMER_IRQ, M_TMARK_IRQ, M_TMARK_NUC, M_SAFEHOLD_IRQ,
  M_PMU_IRQ, M_GLITCH_FILTERED, M_STPH, M_DISC_OUT, M_WDT_RESET, M_SC_RESET, M_NUM
} mech_e;
int mech [M_NUM];
string mech_name [M_NUM] = '{"flash boot", "sram", "1553 access", "1553 timeout",
  "uart command", "uart reply", "uart 56400", "2 KB buffer full", "flash reprogram", "host uart irq", "timer irq",
  "time-mark irq", "time-mark to NUC", "safe-hold irq", "pmu active irq",
  "glitch filtered", "start/stop photo", "discrete outputs", "watch-dog reset",
  "spacecraft reset"};

task automatic check(input logic cond, input string what);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s at %0t", what, $time);
  end
endtask

function automatic logic [31:0] reg_addr(input logic [3:0] blk, input int word);
  return REGS_BASE + {24'h0, blk, 4'h0} + 32'(word * 4);
endfunction

function automatic logic [31:0] uart_addr(input int ch, input logic [1:0] r);
  return ((ch < 4) ? UART0_BASE : UART1_BASE) + 32'((ch % 4) * 16) + 32'({r, 2'b00});
endfunction

function automatic int ch_div(input int ch);
  return (ch == 5) ? DIV56 : DIV19;
endfunction

task automatic kick();
  cpu.write(reg_addr(BLK_WDT, 0), 32'hA5);
endtask

// serial peer: receive one frame on channel ch, checking both lines
task automatic peer_get(input int ch, output logic [7:0] b, output int len);
  int t;
  int div;
  div = ch_div(ch);
  t = 0;
  while (ch_tx_p[ch] !== 1'b0 && t < 100 * div) begin @(posedge clk); t++; end
  check(ch_tx_p[ch] == 1'b0, $sformatf("channel %0d frame started", ch + 1));
  check(ch_tx_r[ch] == 1'b0, "redundant line carries the frame");
  t = 0;
  repeat (div / 2) begin @(posedge clk); t++; end
  for (int i = 0; i < 8; i++) begin
    repeat (div) begin @(posedge clk); t++; end
    b[i] = ch_tx_p[ch];
  end
  repeat (div) begin @(posedge clk); t++; end
  check(ch_tx_p[ch] == 1'b1, "stop bit");
  len = t + (div - div / 2);   // the rest of the stop bit
endtask

task automatic peer_put(input int ch, input logic [7:0] b, input bit on_r);
  logic [9:0] f;
  f = {1'b1, b, 1'b0};
  for (int i = 0; i < 10; i++) begin
    if (on_r) ch_rx_r[ch] <= f[i]; else ch_rx_p[ch] <= f[i];
    repeat (ch_div(ch)) @(posedge clk);
  end
endtask

// a complete command/reply exchange with one sub-unit
task automatic exchange(input int ch, input int n_cmd, input int n_rep, input bit reply_on_r);
  logic [7:0] cmd [$], rep [$];
  logic [31:0] q;
  bit ok_cmd = 1, ok_len = 1, ok_rep = 1;
  for (int i = 0; i < n_cmd; i++) cmd.push_back(8'($urandom));
  for (int i = 0; i < n_rep; i++) rep.push_back(8'($urandom));
  cpu.write(uart_addr(ch, UREG_CTRL), 32'h4);          // clear
  foreach (cmd[i]) cpu.write(uart_addr(ch, UREG_DATA), {24'h0, cmd[i]});
  cpu.read(uart_addr(ch, UREG_COUNT), q);
  check(q == 32'(n_cmd), "byte counter holds the command");
  cpu.write(uart_addr(ch, UREG_CTRL), 32'h3);          // start, RX on
  fork
    begin
      logic [7:0] b;
      int len;
      foreach (cmd[i]) begin
        peer_get(ch, b, len);
        if (b != cmd[i]) ok_cmd = 0;
        if (len != 10 * ch_div(ch)) ok_len = 0;
      end
      repeat (5 * ch_div(ch)) @(posedge clk);
      foreach (rep[i]) peer_put(ch, rep[i], reply_on_r);
    end
    begin
      int polls = 0;
      // software polls: wait for the transmitter, then for the reply
      do begin
        kick();
        repeat (ch_div(ch)) @(posedge clk);
        cpu.read(uart_addr(ch, UREG_CTRL), q);
      end while (q[4] && polls++ < 200);
      do begin
        kick();
        repeat (ch_div(ch)) @(posedge clk);
        cpu.read(uart_addr(ch, UREG_COUNT), q);
      end while (q < 32'(n_rep) && polls++ < 400);
    end
  join
  check(ok_cmd, $sformatf("channel %0d command received by sub-unit", ch + 1));
  check(ok_len, $sformatf("channel %0d frame length", ch + 1));
  foreach (rep[i]) begin
    cpu.read(uart_addr(ch, UREG_DATA), q);
    if (q != {24'h0, rep[i]}) ok_rep = 0;
  end
  check(ok_rep, $sformatf("channel %0d reply read back", ch + 1));
  if (ok_cmd && ok_len) mech[M_UART_CMD]++;
  if (ok_rep) mech[M_UART_REPLY]++;
  if (ok_cmd && ok_len && ch == 5) mech[M_UART_56400]++;
endtask

// take the pending interrupt: read vector, clear, return line
task automatic take_irq(output int line);
  logic [31:0] v;
  cpu.read(reg_addr(BLK_PIC, 2), v);
  line = v[31] ? int'(v[2:0]) : -1;
  if (line >= 0) cpu.write(reg_addr(BLK_PIC, 0), 32'(1 << line));
endtask

task automatic wait_irq(input int max_cycles, output bit seen);
  int n = 0;
  while (!cpu_intr && n < max_cycles) begin @(negedge clk); n++; end
  seen = cpu_intr;
endtask

task automatic wait_reset_release();
  int n = 0;
  while (cpu_reset && n < 1000) begin @(negedge clk); n++; end
  check(!cpu_reset, "reset released");
endtask

task automatic scenario();
  logic [31:0] q;
  int line;
  bit seen;

  // ---------------- power-on and boot from flash
  for (int i = 0; i < 16; i++) fl1.poke(17'h1_FFF0 + i, 32'h9000_0000 + 32'(i));
  repeat (5) @(posedge clk);
  check(cpu_reset, "cpu held in reset at power-on");
  por_n <= 1'b1;
  wait_reset_release();
  cpu.read(32'hFFFF_FFF0, q);                       // reset vector
  check(q == 32'h9000_000C, "reset vector fetched from flash");
  if (q == 32'h9000_000C) mech[M_FLASH_BOOT]++;
  cpu.read(reg_addr(BLK_DISC, 0), q);
  check(q[5:4] == 2'b00, "power-on reset cause");
  for (int i = 0; i < 16; i++) begin
    cpu.read(32'hFFFF_FFC0 + 32'(i * 4), q);
    cpu.write(32'h0010_0000 + 32'(i * 4), q);       // copy image to SRAM
  end
  begin
    bit ok = 1;
    for (int i = 0; i < 16; i++) begin
      cpu.read(32'h0010_0000 + 32'(i * 4), q);
      if (q != 32'h9000_0000 + 32'(i)) ok = 0;
    end
    check(ok, "flash image copied to SRAM");
    if (ok) mech[M_SRAM]++;
  end
  kick();

  // ---------------- 1553: poll for a command, post telemetry
  rt.mem[12'h020] = 16'hC0DE;
  cpu.read(B1553_BASE + 32'h080, q);
  check(q == 32'h0000_C0DE, "1553 command word polled");
  cpu.write(B1553_BASE + 32'h100, 32'hABCD_1234);
  check(rt.mem[12'h040] == 16'h1234, "1553 telemetry word posted");
  if (q == 32'h0000_C0DE && rt.mem[12'h040] == 16'h1234) mech[M_1553]++;

  // ---------------- interrupts enabled for everything
  cpu.write(reg_addr(BLK_PIC, 1), 32'hFF);

  // ---------------- bus error from a silent 1553 device
  rt.dead = 1'b1;
  cpu.read(B1553_BASE + 32'h4, q);
  rt.dead = 1'b0;
  wait_irq(10, seen);
  take_irq(line);
  check(q == 32'hFFFF_FFFF && line == IRQ_BUSERR, "1553 timeout interrupt");
  if (line == IRQ_BUSERR) mech[M_1553_TIMEOUT]++;

  // ---------------- command/reply exchanges
  exchange(0, 6, 5, 1'b0);                          // EOS, reply on primary
  exchange(5, 4, 3, 1'b1);                          // APDE, reply on redundant

  // ---------------- a channel buffer holds exactly 2 KB (DCSU, channel 2)
  begin
    logic [31:0] lo, st;
    cpu.write(uart_addr(1, UREG_CTRL), 32'h4);
    for (int i = 0; i < 2049; i++) begin
      cpu.write(uart_addr(1, UREG_DATA), 32'(i));
      if (i % 256 == 0) kick();
    end
    cpu.read(uart_addr(1, UREG_COUNT), lo);
    cpu.read(uart_addr(1, UREG_CTRL), st);
    check({st[3:0], lo[7:0]} == 12'd2048, $sformatf("buffer holds %0d bytes", {st[3:0], lo[7:0]}));
    cpu.read(uart_addr(1, UREG_DATA), lo);
    check(lo == 32'h0, "oldest byte first");
    if ({st[3:0], 8'h00} == 12'd2048) mech[M_BUF_2K]++;
    cpu.write(uart_addr(1, UREG_CTRL), 32'h4);
    cpu.read(uart_addr(1, UREG_COUNT), lo);
    check(lo == 32'h0, "buffer cleared");
    kick();
  end

  // ---------------- flash reprogrammed with bytes from the EGSE (channel 7)
  begin
    logic [7:0] img [8];
    bit ok = 1;
    int polls = 0;
    foreach (img[i]) img[i] = 8'($urandom);
    cpu.write(uart_addr(6, UREG_CTRL), 32'h6);          // clear, RX on
    fork
      foreach (img[i]) peer_put(6, img[i], 1'b0);
      do begin
        kick();
        repeat (DIV19) @(posedge clk);
        cpu.read(uart_addr(6, UREG_COUNT), q);
      end while (q < 32'd8 && polls++ < 400);
    join
    check(q == 32'd8, "EGSE image bytes received");
    foreach (img[i]) begin                             // byte writes, lane = A1..A0
      cpu.read(uart_addr(6, UREG_DATA), q);
      cpu.write(FLASH_BASE + 32'h100 + 32'(i), {4{q[7:0]}}, ~(4'b0001 << (i % 4)));
    end
    foreach (img[i]) if (8'(fl0.peek(17'h40 + 17'(i / 4)) >> (8 * (i % 4))) != img[i]) ok = 0;
    check(ok, "bytes written into the flash chips");
    cpu.read(FLASH_BASE + 32'h104, q);
    check(q == {img[7], img[6], img[5], img[4]}, "new flash contents read back");
    if (ok && q == {img[7], img[6], img[5], img[4]}) mech[M_FLASH_PROG]++;
    kick();
  end

  // ---------------- host UART (channel 8), full duplex with interrupt
  cpu.write(uart_addr(7, UREG_CTRL), 32'hA);
  cpu.write(uart_addr(7, UREG_DATA), 32'h55);
  fork
    begin
      logic [7:0] b;
      int len;
      peer_get(7, b, len);
      check(b == 8'h55, "host uart transmit");
    end
    peer_put(7, 8'h3A, 1'b0);
  join
  wait_irq(100, seen);
  take_irq(line);
  check(line == IRQ_HOSTUART, "host uart interrupt");
  cpu.read(uart_addr(7, UREG_DATA), q);
  check(q == 32'h3A, "host uart byte");
  if (line == IRQ_HOSTUART && q == 32'h3A) mech[M_HOST_IRQ]++;
  kick();

  // ---------------- RTOS timer tick
  cpu.write(reg_addr(BLK_TIMER, 1), 32'(TMR_RELOAD));
  cpu.write(reg_addr(BLK_TIMER, 2), 32'h1);
  for (int k = 0; k < 2; k++) begin
    wait_irq(TMR_RELOAD + 100, seen);
    take_irq(line);
    check(line == IRQ_TIMER, "timer interrupt");
    if (line == IRQ_TIMER) mech[M_TIMER_IRQ]++;
    kick();
  end
  cpu.write(reg_addr(BLK_TIMER, 2), 32'h0);
  repeat (20) @(posedge clk);
  take_irq(line);                                   // drop a tick in flight

  // ---------------- spacecraft discretes
  @(posedge clk); sc_time_mark <= 1'b1;
  wait_irq(100, seen);
  take_irq(line);
  check(line == IRQ_TMARK, "time-mark interrupt");
  if (line == IRQ_TMARK) mech[M_TMARK_IRQ]++;
  check(nuc_tm == 1'b1, "time-mark forwarded to NUC");
  if (nuc_tm) mech[M_TMARK_NUC]++;
  @(posedge clk); sc_time_mark <= 1'b0;
  repeat (20) @(posedge clk);
  check(nuc_tm == 1'b0, "time-mark to NUC falls");
  // a one-clock glitch on safe-hold is not taken
  @(posedge clk); sc_safe_hold <= 1'b1;
  @(posedge clk); sc_safe_hold <= 1'b0;
  repeat (30) @(posedge clk);
  check(!cpu_intr, "safe-hold glitch ignored");
  if (!cpu_intr) mech[M_GLITCH_FILTERED]++;
  @(posedge clk); sc_safe_hold <= 1'b1;
  wait_irq(100, seen);
  take_irq(line);
  check(line == IRQ_SAFEHOLD, "safe-hold interrupt");
  if (line == IRQ_SAFEHOLD) mech[M_SAFEHOLD_IRQ]++;
  @(posedge clk); sc_pmu_active <= 1'b1;
  wait_irq(100, seen);
  take_irq(line);
  check(line == IRQ_PMUACT, "pmu active interrupt");
  if (line == IRQ_PMUACT) mech[M_PMU_IRQ]++;
  cpu.read(reg_addr(BLK_DISC, 0), q);
  check(q[3:0] == 4'b0101, "discrete input levels");
  cpu.write(reg_addr(BLK_DISC, 1), 32'h15);          // PMU status, tlm 101
  @(negedge clk);
  check(pmu_status && !thtm_sel && tlm == 3'b101 && !spare_out, "discrete outputs");
  if (pmu_status && tlm == 3'b101) mech[M_DISC_OUT]++;

  // ---------------- imaging on/off on the NUC lines
  cpu.write(reg_addr(BLK_LVDS, 0), 32'h1);
  repeat (2) @(negedge clk);
  check(nuc_stph, "start photo");
  cpu.write(reg_addr(BLK_LVDS, 0), 32'h0);
  repeat (2) @(negedge clk);
  check(!nuc_stph, "stop photo");
  if (!nuc_stph) mech[M_STPH]++;
  check(nuc_clk == clk, "NUC clock is the board clock");
  check(!cpu_reset, "watch-dog kept alive so far");

  // ---------------- watch-dog reset
  if (RUN_WDT) begin
    int n = 0;
    while (!cpu_reset && n < WDT_TO + 100) begin @(negedge clk); n++; end
    check(cpu_reset, "watch-dog resets the board");
    check(n > WDT_TO - 200 && n <= WDT_TO + 100, $sformatf("watch-dog after %0d cycles", n));
    check(!nuc_stph && !pmu_status, "outputs return to reset values");
    wait_reset_release();
    cpu.read(reg_addr(BLK_DISC, 0), q);
    check(q[5:4] == 2'b10, "watch-dog reset cause");
    if (q[5:4] == 2'b10) mech[M_WDT_RESET]++;
  end

  // ---------------- spacecraft reset discrete
  @(posedge clk); sc_reset <= 1'b1;
  repeat (10) @(posedge clk);
  check(cpu_reset, "spacecraft reset discrete resets the board");
  sc_reset <= 1'b0;
  wait_reset_release();
  cpu.read(reg_addr(BLK_DISC, 0), q);
  check(q[5:4] == 2'b01, "spacecraft reset cause");
  if (q[5:4] == 2'b01) mech[M_SC_RESET]++;
  cpu.read(32'h0010_0000, q);
  check(q == 32'h9000_0000, "SRAM keeps its contents over reset");
  check(cpu.timeouts == 0, "no hung bus cycle");
endtask

task automatic report();
  for (int m = 0; m < M_NUM; m++) begin
    $display("mechanism %-18s happened %0d times", mech_name[m], mech[m]);
    if (!RUN_WDT && m == M_WDT_RESET) continue;
    checks++;
    if (mech[m] == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", mech_name[m]);
    end
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
