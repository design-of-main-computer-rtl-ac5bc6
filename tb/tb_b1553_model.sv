// tb_b1553_model: behavioural model of the host side of the 16-bit
// MIL-STD-1553 remote terminal device, for testbenches: a 16K-word shared
// memory reached through a 12-bit address window. LATENCY clocks after CS#
// and STRB# go low it answers READY# low (with read data, or storing write
// data) until the strobe ends. With 'dead' set it never answers. The serial
// 1553 side is not modelled.
module tb_b1553_model #(
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic [11:0] addr,
  input  logic        cs_n,
  input  logic        strb_n,
  input  logic        rd_wr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ready_n
);
  logic [15:0] mem [16384];
  logic dead = 1'b0;
  int   cnt = 0;
  int   accesses = 0;
  logic [11:0] last_addr = '0;

  initial begin
    for (int i = 0; i < 16384; i++) mem[i] = 16'(i * 3 + 1);
    ready_n = 1'b1;
    rdata   = '0;
  end

  always @(posedge clk) begin
    if (cs_n || strb_n) begin
      cnt     <= 0;
      ready_n <= 1'b1;
    end else if (!dead) begin
      cnt <= cnt + 1;
      if (cnt == LATENCY - 1) begin
        ready_n   <= 1'b0;
        last_addr <= addr;
        accesses  <= accesses + 1;
        if (rd_wr) rdata <= mem[{2'b00, addr}];
        else       mem[{2'b00, addr}] <= wdata;
      end
    end
  end
endmodule
