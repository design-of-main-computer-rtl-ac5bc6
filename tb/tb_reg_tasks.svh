// Register-bus helper tasks shared by the register block testbenches.
// The including module declares clk, cs, req (sbc_pkg::reg_req_t), rdata,
// checks and failures.
task automatic check(input logic cond, input string what);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s at %0t", what, $time);
  end
endtask

task automatic reg_wr(input logic [5:0] a, input logic [31:0] d);
  @(posedge clk);
  cs <= 1'b1; req.wr <= 1'b1; req.rd <= 1'b0; req.addr <= a; req.wdata <= d;
  @(posedge clk);
  cs <= 1'b0; req.wr <= 1'b0;
endtask

task automatic reg_rd(input logic [5:0] a, output logic [31:0] d);
  @(posedge clk);
  cs <= 1'b1; req.rd <= 1'b1; req.wr <= 1'b0; req.addr <= a;
  @(posedge clk);
  cs <= 1'b0; req.rd <= 1'b0;
  @(negedge clk);
  d = 32'(rdata);
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
