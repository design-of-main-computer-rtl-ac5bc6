// pic: programmable interrupt controller of the interfacing FPGA.
//
// NUM_IRQ request lines are edge triggered: a rising edge on src[i] sets
// pending bit i. The CPU interrupt line intr is high while any pending bit
// is also enabled in the mask. Registers (word index on req.addr[1:0]):
//   0 PEND  read: pending bits; write: 1 clears the bit (write-one-to-clear)
//   1 MASK  read/write: 1 enables the request line
//   2 VEC   read: bit31 set when an enabled request is pending, bits 2..0 the
//           lowest-numbered such line (line 0 has the highest priority)
// An edge arriving in the same cycle as its clear wins over the clear. All
// state resets to zero (everything masked). Read data is registered, valid
// the cycle after rd.
//
// That the FPGA holds an interrupt controller, fed by the timer and the
// spacecraft discretes, follows the design description. The register set,
// edge triggering and fixed priority are this design's choices; the CPU
// reads the vector from VEC rather than through a 486 acknowledge cycle.
module pic #(
  parameter int unsigned NUM_IRQ = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cs,
  input  sbc_pkg::reg_req_t  req,
  output logic [31:0]        rdata,
  input  logic [NUM_IRQ-1:0] src,
  output logic               intr
);
  logic [NUM_IRQ-1:0] src_q, pend, mask, active;
  logic [NUM_IRQ-1:0] rise;

  assign rise   = src & ~src_q;
  assign active = pend & mask;
  assign intr   = |active;

  logic [31:0] vec;
  always_comb begin
    vec = '0;
    for (int i = NUM_IRQ - 1; i >= 0; i--) begin
      if (active[i]) vec = {1'b1, 31'(i)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= '0;
      pend  <= '0;
      mask  <= '0;
      rdata <= '0;
    end else begin
      src_q <= src;
      if (cs && req.wr && req.addr[1:0] == 2'd0)
        pend <= (pend & ~req.wdata[NUM_IRQ-1:0]) | rise;
      else
        pend <= pend | rise;
      if (cs && req.wr && req.addr[1:0] == 2'd1)
        mask <= req.wdata[NUM_IRQ-1:0];
      if (cs && req.rd) begin
        unique case (req.addr[1:0])
          2'd0:    rdata <= 32'(pend);
          2'd1:    rdata <= 32'(mask);
          2'd2:    rdata <= vec;
          default: rdata <= '0;
        endcase
      end
    end
  end
endmodule
