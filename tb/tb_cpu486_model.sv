// tb_cpu486_model: behavioural bus master standing in for the 80486DX2 in
// testbenches. It runs single (non-burst) memory and I/O cycles: ADS# low for
// one clock with address, byte enables, W/R# and M/IO#, write data held,
// then it waits for RDY# (sampled on the falling clock edge) and takes the
// read data. cycles returns the clocks of the last bus cycle counted from
// ADS#, so testbenches can check wait states.
module tb_cpu486_model (
  input  logic        clk,
  output logic        ads_n,
  output logic        mio,
  output logic        wr,
  output logic [31:2] addr,
  output logic [3:0]  be_n,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        rdy_n
);
  int cycles;
  int timeouts;

  initial begin
    ads_n = 1'b1; mio = 1'b1; wr = 1'b0; addr = '0; be_n = 4'hF; wdata = '0;
    cycles = 0; timeouts = 0;
  end

  task automatic cycle(input logic m, input logic w, input logic [31:0] a,
                       input logic [3:0] ben, input logic [31:0] d,
                       output logic [31:0] q);
    @(posedge clk);
    ads_n <= 1'b0; mio <= m; wr <= w; addr <= a[31:2]; be_n <= ben; wdata <= d;
    @(posedge clk);
    ads_n <= 1'b1;
    cycles = 1;     // the ADS# clock
    q = '0;
    forever begin
      @(negedge clk);
      cycles++;
      if (!rdy_n) begin q = rdata; break; end
      if (cycles > 5000) begin timeouts++; break; end
    end
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d,
                       input logic [3:0] ben = 4'h0);
    logic [31:0] q;
    cycle(1'b1, 1'b1, a, ben, d, q);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] q);
    cycle(1'b1, 1'b0, a, 4'h0, 32'h0, q);
  endtask

  task automatic io_read(input logic [31:0] a, output logic [31:0] q);
    cycle(1'b0, 1'b0, a, 4'h0, 32'h0, q);
  endtask
endmodule
