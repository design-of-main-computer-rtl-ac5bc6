// wdt: watch-dog timer of the interfacing FPGA.
//
// A down-counter starts at TIMEOUT clock cycles after reset and is always
// running: software cannot stop it. Writing the key 0xA5 to the KICK
// register (word 0) reloads it; any other value is ignored. If it reaches
// zero, expire goes high and stays high until reset; the reset generator
// turns it into a board reset. Word 1 reads the cycles left. Read data is
// registered, valid the cycle after rd.
//
// The design description names the watch-dog timer and its place in the
// FPGA; the timeout (1 s at 25 MHz), the key and the always-on behaviour are
// this design's own choices.
module wdt #(
  parameter int unsigned TIMEOUT = 25_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  sbc_pkg::reg_req_t req,
  output logic [31:0]       rdata,
  output logic              expire
);
  logic [31:0] cnt;
  logic        kick;

  assign kick = cs && req.wr && req.addr[1:0] == 2'd0 &&
                req.wdata[7:0] == sbc_pkg::WDT_KEY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= 32'(TIMEOUT);
      expire <= 1'b0;
      rdata  <= '0;
    end else begin
      if (expire)        cnt <= '0;
      else if (kick)     cnt <= 32'(TIMEOUT);
      else if (cnt != 0) cnt <= cnt - 1'b1;
      if (cnt == 0) expire <= 1'b1;
      if (cs && req.rd) rdata <= (req.addr[1:0] == 2'd1) ? cnt : '0;
    end
  end
endmodule
