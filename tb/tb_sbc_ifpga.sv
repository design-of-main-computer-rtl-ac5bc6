// tb_sbc_ifpga: self-checking test of the interfacing FPGA on its own, with
// the behavioural CPU and memories: register blocks reached through the bus,
// interrupt routing of every line to the CPU's INTR with its vector, the UART
// chip selects, and the three reset causes.
module tb_sbc_ifpga;
  import sbc_pkg::*;
  localparam int WDT_TO = 3000;
  logic clk = 0, por_n = 1;
  initial #1 por_n = 0;          // a falling edge, so the reset acts at once
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, ads_n, mio, wr, rdy_n, cpu_intr, cpu_reset;
  logic [31:2] addr; logic [3:0] be_n; logic [31:0] wdata, rdata;
  logic [18:0] sram_addr;  logic sram_ce_n, sram_oe_n; logic [3:0] sram_we_n;
  logic [31:0] sram_wdata, sram_rdata;
  logic [16:0] flash_addr; logic [1:0] flash_ce_n; logic flash_oe_n; logic [3:0] flash_we_n;
  logic [31:0] flash_wdata, flash_rdata;
  logic [11:0] b_addr; logic b_cs_n, b_strb_n, b_rd_wr, b_ready_n;
  logic [15:0] b_wdata, b_rdata;
  logic [1:0]  uart_cs; reg_req_t uart_req; logic [7:0] uart_rdata [2];
  logic        host_uart_irq = 0;
  logic        sc_reset = 0, sc_safe_hold = 0, sc_time_mark = 0, sc_pmu_active = 0, sc_spare = 0;
  logic        pmu_status, thtm_sel, spare_out, nuc_tm, nuc_stph;
  logic [2:0]  tlm;

  sbc_ifpga #(.WDT_TIMEOUT(WDT_TO), .TIMER_RELOAD(100)) dut (.*);
  tb_cpu486_model cpu (.clk, .ads_n, .mio, .wr, .addr, .be_n, .wdata, .rdata, .rdy_n);
  tb_mem_model #(.AW(19)) sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
    .we_n(sram_we_n), .wdata(sram_wdata), .rdata(sram_rdata));
  tb_mem_model #(.AW(17)) fl0 (.clk, .addr(flash_addr), .ce_n(flash_ce_n[0]), .oe_n(flash_oe_n),
    .we_n(flash_we_n), .wdata(flash_wdata), .rdata(flash_rdata));
  tb_b1553_model rt (.clk, .addr(b_addr), .cs_n(b_cs_n), .strb_n(b_strb_n), .rd_wr(b_rd_wr),
    .wdata(b_wdata), .rdata(b_rdata), .ready_n(b_ready_n));

  int ucs [2] = '{0, 0};
  always @(posedge clk) begin
    uart_rdata[0] <= 8'h5A;
    uart_rdata[1] <= 8'hA5;
    for (int i = 0; i < 2; i++) if (uart_cs[i] && (uart_req.rd || uart_req.wr)) ucs[i]++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ra(input logic [3:0] blk, input int w);
    return REGS_BASE + {24'h0, blk, 4'h0} + 32'(w * 4);
  endfunction

  task automatic expect_irq(input int line, input string what);
    logic [31:0] v;
    int n = 0;
    while (!cpu_intr && n < 200) begin @(negedge clk); n++; end
    cpu.read(ra(BLK_PIC, 2), v);
    check(cpu_intr && v == {1'b1, 31'(line)}, $sformatf("%s: vector %h", what, v));
    cpu.write(ra(BLK_PIC, 0), 32'(1 << line));
    @(negedge clk);
    check(!cpu_intr, {what, ": cleared"});
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q;
  initial begin
    repeat (3) @(posedge clk);
    check(cpu_reset && !rst_n, "reset at power-on");
    por_n <= 1;
    while (cpu_reset) @(negedge clk);
    // memories through the FPGA
    cpu.write(32'h0000_0100, 32'h0102_0304);
    cpu.read(32'h0000_0100, q);  check(q == 32'h0102_0304, "sram");
    fl0.poke(5, 32'hF1A5_0005);
    cpu.read(32'hFFF0_0014, q);  check(q == 32'hF1A5_0005, "flash");
    cpu.read(B1553_BASE + 32'h10, q); check(q == 32'(4 * 3 + 1), "1553");
    cpu.read(UART0_BASE, q);     check(q == 32'h5A, "uart fpga 0");
    cpu.write(UART1_BASE + 32'h30, 32'h1);
    cpu.read(UART1_BASE, q);     check(q == 32'hA5, "uart fpga 1");
    check(ucs[0] == 1 && ucs[1] == 2, "uart chip selects");
    // register blocks
    cpu.write(ra(BLK_PIC, 1), 32'hFF);
    cpu.read(ra(BLK_PIC, 1), q);   check(q == 32'hFF, "pic mask");
    cpu.read(ra(BLK_TIMER, 1), q); check(q == 32'd100, "timer reload");
    cpu.read(ra(BLK_WDT, 1), q);   check(q > 0 && q <= WDT_TO, "wdt count");
    cpu.write(ra(BLK_LVDS, 0), 32'h1);
    @(negedge clk); @(negedge clk); check(nuc_stph, "stph");
    cpu.write(ra(BLK_DISC, 1), 32'h3F);
    @(negedge clk); check(pmu_status && thtm_sel && tlm == 3'b111 && spare_out, "discrete out");
    cpu.read(32'h4000_0000, q);    check(q == 0, "unmapped");
    // interrupt lines
    cpu.write(ra(BLK_TIMER, 2), 32'h1);
    expect_irq(IRQ_TIMER, "timer");
    cpu.write(ra(BLK_TIMER, 2), 32'h0);
    repeat (3) @(posedge clk);
    cpu.write(ra(BLK_PIC, 0), 32'hFF);
    cpu.write(ra(BLK_WDT, 0), 32'hA5);
    sc_time_mark <= 1;  expect_irq(IRQ_TMARK, "time-mark");
    check(nuc_tm, "time-mark to NUC");
    sc_safe_hold <= 1;  expect_irq(IRQ_SAFEHOLD, "safe-hold");
    sc_pmu_active <= 1; expect_irq(IRQ_PMUACT, "pmu active");
    host_uart_irq <= 1; expect_irq(IRQ_HOSTUART, "host uart");
    cpu.write(ra(BLK_WDT, 0), 32'hA5);
    rt.dead = 1; cpu.read(B1553_BASE, q); rt.dead = 0;
    expect_irq(IRQ_BUSERR, "1553 timeout");
    sc_spare <= 1;      expect_irq(IRQ_SPARE, "spare");
    cpu.read(ra(BLK_DISC, 0), q); check(q == 32'h0F, "discrete levels");
    // watch-dog reset
    while (!cpu_reset) @(negedge clk);
    check(!nuc_stph && !pmu_status, "reset clears outputs");
    while (cpu_reset) @(negedge clk);
    cpu.read(ra(BLK_DISC, 0), q); check(q[5:4] == 2'b10, "wdt cause");
    cpu.read(ra(BLK_PIC, 1), q);  check(q == 0, "pic reset by watch-dog");
    // spacecraft reset
    sc_reset <= 1; repeat (5) @(posedge clk); sc_reset <= 0;
    check(cpu_reset, "spacecraft reset");
    while (cpu_reset) @(negedge clk);
    cpu.read(ra(BLK_DISC, 0), q); check(q[5:4] == 2'b01, "spacecraft cause");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
