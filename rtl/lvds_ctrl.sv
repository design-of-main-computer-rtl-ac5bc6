// lvds_ctrl: logic behind the LVDS lines from the SBC to the NUC board.
//
// Three signals go to the NUC: the 25 MHz board clock (nuc_clk, which the NUC
// uses for all its FPGAs), the 1 Hz time-mark received from the spacecraft
// (nuc_tm) and the start/stop photo trigger (nuc_stph, high = imaging on).
// The trigger is bit0 of the CTRL register (word 0), written by software and
// reset to 0 (stopped). The time-mark and trigger outputs are registered,
// so both reach the NUC aligned to the clock that goes with them. The clock
// itself is wired from the board clock at the top level.
// Read data is registered, valid the cycle after rd.
//
// The three signals follow the design description and the SBC block
// diagram; the register, its reset value and the output registers are this
// design's choices. The LVDS drivers themselves are outside this logic.
module lvds_ctrl (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  sbc_pkg::reg_req_t req,
  output logic [31:0]       rdata,
  input  logic              time_mark,
  output logic              nuc_tm,
  output logic              nuc_stph
);
  logic ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl     <= 1'b0;
      nuc_tm   <= 1'b0;
      nuc_stph <= 1'b0;
      rdata    <= '0;
    end else begin
      if (cs && req.wr && req.addr[1:0] == 2'd0) ctrl <= req.wdata[0];
      nuc_tm   <= time_mark;
      nuc_stph <= ctrl;
      if (cs && req.rd) rdata <= (req.addr[1:0] == 2'd0) ? {31'b0, ctrl} : '0;
    end
  end
endmodule
