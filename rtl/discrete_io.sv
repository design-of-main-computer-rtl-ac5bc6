// discrete_io: the bi-level (discrete) signals between the spacecraft and
// the SBC.
//
// Inputs from the spacecraft: safe-hold (shutdown warning), 1 Hz time-mark,
// PMU active (selects the primary or redundant SBC) and a spare. Each passes
// two synchronising flip-flops and a filter that accepts a new level only
// after it has been steady for FILTER cycles, so shorter glitches are
// dropped. Filtered rising edges of safe-hold, time-mark and spare, and
// either edge of PMU active, leave as one-cycle pulses for the interrupt
// controller; the filtered time-mark level goes on to the LVDS lines.
// Outputs: PMU status (this SBC is the active one), THTM primary/redundant
// switch, three telemetry status bits and a spare, from a register.
// Registers (word index on req.addr[1:0]):
//   0 IN   read: bit0 safe-hold, bit1 time-mark, bit2 PMU active, bit3
//          spare, bits 5..4 last reset cause (from the reset generator)
//   1 OUT  read/write: bit0 PMU status, bit1 THTM switch, bits 4..2
//          telemetry, bit5 spare; resets to 0
// Read data is registered, valid the cycle after rd.
//
// The signals and their use with interrupts follow the design description
// and the interface diagrams; the filter, register layout and the meaning
// of the three telemetry bits are this design's own. The open-collector
// circuits on the board are outside this logic.
module discrete_io #(
  parameter int unsigned FILTER = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  sbc_pkg::reg_req_t req,
  output logic [31:0]       rdata,
  input  logic              sc_safe_hold,
  input  logic              sc_time_mark,
  input  logic              sc_pmu_active,
  input  logic              sc_spare,
  input  logic [1:0]        reset_cause,
  output logic              ev_safe_hold,
  output logic              ev_time_mark,
  output logic              ev_pmu_active,
  output logic              ev_spare,
  output logic              time_mark,
  output logic              pmu_status,
  output logic              thtm_sel,
  output logic [2:0]        tlm,
  output logic              spare_out
);
  localparam int unsigned CW = $clog2(FILTER + 1);

  logic [3:0]    raw, s1, s2, lvl, lvl_q;
  logic [CW-1:0] stable [4];
  logic [5:0]    out_q;

  assign raw = {sc_spare, sc_pmu_active, sc_time_mark, sc_safe_hold};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '0;
      s2    <= '0;
      lvl   <= '0;
      lvl_q <= '0;
      for (int i = 0; i < 4; i++) stable[i] <= '0;
    end else begin
      s1    <= raw;
      s2    <= s1;
      lvl_q <= lvl;
      for (int i = 0; i < 4; i++) begin
        if (s2[i] == lvl[i]) begin
          stable[i] <= '0;
        end else if (stable[i] == CW'(FILTER - 1)) begin
          lvl[i]    <= s2[i];
          stable[i] <= '0;
        end else begin
          stable[i] <= stable[i] + 1'b1;
        end
      end
    end
  end

  assign ev_safe_hold  = lvl[0] & ~lvl_q[0];
  assign ev_time_mark  = lvl[1] & ~lvl_q[1];
  assign ev_pmu_active = lvl[2] ^ lvl_q[2];
  assign ev_spare      = lvl[3] & ~lvl_q[3];
  assign time_mark     = lvl[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      rdata <= '0;
    end else begin
      if (cs && req.wr && req.addr[1:0] == 2'd1) out_q <= req.wdata[5:0];
      if (cs && req.rd) begin
        unique case (req.addr[1:0])
          2'd0:    rdata <= {26'b0, reset_cause, lvl};
          2'd1:    rdata <= {26'b0, out_q};
          default: rdata <= '0;
        endcase
      end
    end
  end

  assign pmu_status = out_q[0];
  assign thtm_sel   = out_q[1];
  assign tlm        = out_q[4:2];
  assign spare_out  = out_q[5];
endmodule
