// sys_timer: 32-bit timer that gives the real-time operating system its
// clock tick.
//
// When enabled, a 32-bit down-counter counts clock cycles; when it is zero
// it reloads from RELOAD and tick pulses for one cycle, so the tick period is
// RELOAD + 1 cycles. Enabling (a write of CTRL with bit0 set) loads the
// counter from RELOAD. Registers (word index on req.addr[1:0]):
//   0 COUNT   read: current count
//   1 RELOAD  read/write, resets to DEFAULT_RELOAD
//   2 CTRL    read/write: bit0 enable, resets to 0
// Read data is registered, valid the cycle after rd.
//
// The 32-bit width and its use as the RTOS clock follow the design
// description; the register set and the default tick (10 ms at 25 MHz) are
// this design's choices.
module sys_timer #(
  parameter int unsigned DEFAULT_RELOAD = 249_999
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  sbc_pkg::reg_req_t req,
  output logic [31:0]       rdata,
  output logic              tick
);
  logic [31:0] cnt, reload;
  logic        en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      reload <= 32'(DEFAULT_RELOAD);
      en     <= 1'b0;
      tick   <= 1'b0;
      rdata  <= '0;
    end else begin
      tick <= 1'b0;
      if (cs && req.wr && req.addr[1:0] == 2'd1) reload <= req.wdata;
      if (cs && req.wr && req.addr[1:0] == 2'd2) begin
        en  <= req.wdata[0];
        cnt <= reload;
      end else if (en) begin
        if (cnt == 0) begin
          cnt  <= reload;
          tick <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
      if (cs && req.rd) begin
        unique case (req.addr[1:0])
          2'd0:    rdata <= cnt;
          2'd1:    rdata <= reload;
          2'd2:    rdata <= {31'b0, en};
          default: rdata <= '0;
        endcase
      end
    end
  end
endmodule
