// Runs the operating points evaluated for the multiplier, other than the
// default build: 1024-bit operands with 8-bit words and 16 stages, 256-bit
// operands with 32-bit words and 4 stages, and 1024-bit operands with 64-bit
// words and 2 stages. Each instance checks its own results.
module tb_mwr4mm_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin [3];
  int   chk [3];
  int   fl  [3];

  always #5 clk = ~clk;

  mwr4mm_runner #(.N(1024), .W(8),  .NS(16), .NT(2)) u_r0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  mwr4mm_runner #(.N(256),  .W(32), .NS(4),  .NT(4)) u_r1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  mwr4mm_runner #(.N(1024), .W(64), .NS(2),  .NT(2)) u_r2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end
endmodule
