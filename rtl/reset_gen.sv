// reset_gen: board reset of the SBC.
//
// Three causes reset the board: power-on (por_n low), the spacecraft's
// 'reset' discrete (sc_reset high) and the watch-dog timer (wdt_expire
// high). The discrete is brought into the clock domain by two flip-flops.
// While any cause is present, and for STRETCH cycles after the last one
// goes away, rst_n (for the logic, active low) and cpu_reset (for the 486,
// active high) are asserted; both leave reset on a clock edge. cause records
// what started the last reset (bit0 spacecraft discrete, bit1 watch-dog) and
// is cleared only by power-on, so software can read it after restarting.
//
// The three causes follow the design description. The stretch (16 cycles,
// the 486 wants at least 15 clocks of RESET) and the cause register are this
// design's choices.
module reset_gen #(
  parameter int unsigned STRETCH = 16
) (
  input  logic       clk,
  input  logic       por_n,
  input  logic       sc_reset,
  input  logic       wdt_expire,
  output logic       rst_n,
  output logic       cpu_reset,
  output logic [1:0] cause
);
  localparam int unsigned CW = $clog2(STRETCH + 1);

  logic          sc_s1, sc_s2;
  logic [CW-1:0] cnt;
  logic          req;

  assign req = sc_s2 || wdt_expire;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      sc_s1     <= 1'b0;
      sc_s2     <= 1'b0;
      cnt       <= CW'(STRETCH);
      rst_n     <= 1'b0;
      cpu_reset <= 1'b1;
      cause     <= '0;
    end else begin
      sc_s1 <= sc_reset;
      sc_s2 <= sc_s1;
      if (req) begin
        cnt       <= CW'(STRETCH);
        rst_n     <= 1'b0;
        cpu_reset <= 1'b1;
        if (rst_n) cause <= {wdt_expire, sc_s2};
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        rst_n     <= 1'b1;
        cpu_reset <= 1'b0;
      end
    end
  end
endmodule
