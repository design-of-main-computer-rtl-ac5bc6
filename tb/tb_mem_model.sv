// tb_mem_model: behavioural model of one bank of four byte-wide memory
// chips (SRAM or flash) on a 32-bit bus, for testbenches. Reads are
// asynchronous while CE# and OE# are low; each byte lane is written at the
// clock edge while CE# and its WE# are low (a clocked simplification of the
// chips' write pulse). Flash command sequences are not modelled: a write
// simply stores. Storage is sparse, so large banks cost nothing.
module tb_mem_model #(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic [3:0]    we_n,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [int];
  int writes = 0, reads = 0;

  function automatic logic [31:0] peek(input int a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  function automatic void poke(input int a, input logic [31:0] d);
    mem[a] = d;
  endfunction

  assign rdata = (!ce_n && !oe_n) ? peek(int'(addr)) : 32'h0;

  always @(posedge clk) begin
    if (!ce_n && we_n != 4'hF) begin
      logic [31:0] w;
      w = peek(int'(addr));
      for (int i = 0; i < 4; i++)
        if (!we_n[i]) w[8*i +: 8] = wdata[8*i +: 8];
      mem[int'(addr)] = w;
      writes++;
    end
    if (!ce_n && !oe_n) reads++;
  end
endmodule
