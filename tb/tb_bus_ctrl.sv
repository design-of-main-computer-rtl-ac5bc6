// tb_bus_ctrl: self-checking test of the address decoder and cycle
// controller with behavioural SRAM, flash, 1553 device, UART FPGA and
// register block stand-ins. Checks data, byte lanes, flash bank selection,
// the one-bit shifted 1553 address, the 1553 timeout, the UART byte lane,
// unmapped and I/O cycles, and the length of every bus cycle
// (wait states + 3 clocks).
module tb_bus_ctrl;
  import sbc_pkg::*;
  localparam int SRAM_WS = 1, FLASH_WS = 3, UART_WS = 2, REG_WS = 1, TMO = 64;
  localparam int B_LAT = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;          // a falling edge, so the reset acts at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ads_n, mio, wr, rdy_n;
  logic [31:2] addr;
  logic [3:0]  be_n;
  logic [31:0] wdata, rdata;
  logic [18:0] sram_addr;  logic sram_ce_n, sram_oe_n; logic [3:0] sram_we_n;
  logic [31:0] sram_wdata, sram_rdata;
  logic [16:0] flash_addr; logic [1:0] flash_ce_n; logic flash_oe_n; logic [3:0] flash_we_n;
  logic [31:0] flash_wdata, flash_rdata, f0_rdata, f1_rdata;
  logic [11:0] b_addr; logic b_cs_n, b_strb_n, b_rd_wr, b_ready_n;
  logic [15:0] b_wdata, b_rdata;
  logic [1:0]  uart_cs; reg_req_t uart_req; logic [7:0] uart_rdata [2];
  logic        regs_cs; reg_req_t regs_req; logic [31:0] regs_rdata;
  logic        bus_err;
  int          n_bus_err = 0;

  bus_ctrl #(.SRAM_WS(SRAM_WS), .FLASH_WS(FLASH_WS), .UART_WS(UART_WS),
             .REG_WS(REG_WS), .B1553_TIMEOUT(TMO)) dut (.*);

  tb_cpu486_model cpu (.clk, .ads_n, .mio, .wr, .addr, .be_n, .wdata, .rdata, .rdy_n);
  tb_mem_model #(.AW(19)) sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
    .we_n(sram_we_n), .wdata(sram_wdata), .rdata(sram_rdata));
  tb_mem_model #(.AW(17)) fl0 (.clk, .addr(flash_addr), .ce_n(flash_ce_n[0]), .oe_n(flash_oe_n),
    .we_n(flash_we_n), .wdata(flash_wdata), .rdata(f0_rdata));
  tb_mem_model #(.AW(17)) fl1 (.clk, .addr(flash_addr), .ce_n(flash_ce_n[1]), .oe_n(flash_oe_n),
    .we_n(flash_we_n), .wdata(flash_wdata), .rdata(f1_rdata));
  assign flash_rdata = f0_rdata | f1_rdata;
  tb_b1553_model #(.LATENCY(B_LAT)) b1553 (.clk, .addr(b_addr), .cs_n(b_cs_n), .strb_n(b_strb_n),
    .rd_wr(b_rd_wr), .wdata(b_wdata), .rdata(b_rdata), .ready_n(b_ready_n));

  // UART FPGA and register stand-ins: remember writes, answer reads with a
  // value made from the address
  logic [7:0]  uart_last_w [2];
  logic [5:0]  uart_last_a [2];
  logic [31:0] regs_last_w;
  int          uart_strobes = 0, regs_strobes = 0;
  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) if (uart_cs[i]) begin
      if (uart_req.wr) begin uart_last_w[i] <= uart_req.wdata[7:0]; uart_last_a[i] <= uart_req.addr; end
      if (uart_req.rd) uart_rdata[i] <= 8'({i[1:0], uart_req.addr});
      if (uart_req.rd || uart_req.wr) uart_strobes++;
    end
    if (regs_cs) begin
      if (regs_req.wr) regs_last_w <= regs_req.wdata;
      if (regs_req.rd) regs_rdata <= {26'h2AAAAAA, regs_req.addr};
      if (regs_req.rd || regs_req.wr) regs_strobes++;
    end
    if (rst_n && bus_err) n_bus_err++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q;
  initial begin
    uart_rdata[0] = 0; uart_rdata[1] = 0; regs_rdata = 0;
    repeat (3) @(posedge clk); rst_n <= 1;

    // SRAM
    cpu.write(32'h0000_0010, 32'hDEAD_BEEF);
    check(cpu.cycles == SRAM_WS + 3, $sformatf("sram write cycle %0d", cpu.cycles));
    check(sram.peek(4) == 32'hDEAD_BEEF, "sram word stored at word 4");
    cpu.read(32'h0000_0010, q);
    check(q == 32'hDEAD_BEEF, "sram read");
    check(cpu.cycles == SRAM_WS + 3, "sram read cycle");
    cpu.write(32'h0000_0010, 32'h1122_3344, 4'b1010);   // lanes 0 and 2
    cpu.read(32'h0000_0010, q);
    check(q == 32'hDE22_BE44, $sformatf("byte enables %h", q));
    cpu.write(32'h001F_FFFC, 32'hCAFE_0001);            // last word of 2 MB
    check(sram.peek(32'h7FFFF) == 32'hCAFE_0001, "sram top word");
    // flash
    fl0.poke(32'h1_FFFC, 32'h0BAD_F00D);
    fl1.poke(32'h0_0003, 32'h1234_5678);
    cpu.read(32'hFFF7_FFF0, q);
    check(q == 32'h0BAD_F00D, "flash bank 0");
    check(cpu.cycles == FLASH_WS + 3, $sformatf("flash read cycle %0d", cpu.cycles));
    cpu.read(32'hFFF8_000C, q);
    check(q == 32'h1234_5678, "flash bank 1");
    cpu.write(32'hFFF0_0040, 32'hA5A5_5A5A);
    check(fl0.peek(16) == 32'hA5A5_5A5A && fl1.peek(16) == 32'h0, "flash write bank 0 only");
    // 1553: CPU address 0x8000_0000 + 4k -> device word k
    cpu.read(B1553_BASE + 32'h0000_0400, q);
    check(b1553.last_addr == 12'h100, "1553 address shifted by one bit");
    check(q == {16'h0, 16'(12'h100 * 3 + 1)}, $sformatf("1553 read %h", q));
    check(cpu.cycles == B_LAT + 3, $sformatf("1553 cycle %0d", cpu.cycles));
    cpu.write(B1553_BASE + 32'h0000_3FFC, 32'hFFFF_4321);
    check(b1553.mem[14'hFFF] == 16'h4321, "1553 write low word, last of 4K");
    cpu.read(B1553_BASE + 32'h0000_3FFC, q);
    check(q == 32'h0000_4321, "1553 read back");
    b1553.dead = 1'b1;
    cpu.read(B1553_BASE + 32'h8, q);
    @(posedge clk); @(negedge clk);
    check(q == 32'hFFFF_FFFF && n_bus_err == 1, "1553 timeout");
    check(cpu.cycles == TMO + 3, $sformatf("1553 timeout cycle %0d", cpu.cycles));
    b1553.dead = 1'b0;
    // UART FPGAs: byte lane 0
    cpu.write(UART1_BASE + 32'h24, 32'h1234_5678);
    check(uart_last_w[1] == 8'h78 && uart_last_a[1][3:0] == 4'h9, "uart write lsb");
    check(cpu.cycles == UART_WS + 3, $sformatf("uart cycle %0d", cpu.cycles));
    cpu.read(UART0_BASE + 32'h08, q);
    check(q == 32'h02, $sformatf("uart0 read %h", q));
    cpu.read(UART1_BASE + 32'h3C, q);
    check(q == {24'h0, 8'({2'd1, 6'h1F})}, $sformatf("uart1 read %h", q));
    // registers
    cpu.write(REGS_BASE + 32'h44, 32'h8765_4321);
    check(regs_last_w == 32'h8765_4321, "register write");
    check(cpu.cycles == REG_WS + 3, "register cycle");
    cpu.read(REGS_BASE + 32'h30, q);
    check(q == {26'h2AAAAAA, 6'h0C}, "register read");
    check(uart_strobes == 3 && regs_strobes == 2, "one strobe per cycle");
    // unmapped and I/O
    cpu.read(32'h4000_0000, q);
    check(q == 0 && cpu.cycles == 2, "unmapped read ends at once");
    cpu.io_read(32'h0000_0010, q);
    check(q == 0 && cpu.cycles == 2, "io cycle ends at once");
    check(cpu.timeouts == 0, "no hung cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
