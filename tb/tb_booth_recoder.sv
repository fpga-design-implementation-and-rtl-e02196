// Self-checking test of booth_recoder: every triple gives the Booth digit
// -2*a[j+1] + a[j] + a[j-1]; the SEL coding makes +B/+2B and -B/-2B inverse
// codes; for a zero digit SEL keeps the previous value and NEG is 0.
module tb_booth_recoder;
  import mwr4mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] trip = '0;
  mult_ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic sel_seen[int];

  booth_recoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev_sel;
    int expd;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      prev_sel = ctrl.sel;
      trip = 3'($urandom);
      #1;
      expd = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      checks++;
      if (ctrl_value(ctrl) != expd) begin
        failures++; $display("trip %b: got %0d exp %0d", trip, ctrl_value(ctrl), expd);
      end
      if (expd == 0) begin
        checks++;
        if (ctrl.sel !== prev_sel || ctrl.neg) begin failures++; $display("SEL not frozen for zero digit"); end
      end else sel_seen[expd] = ctrl.sel;
    end
    checks++;
    if (sel_seen[1] != ~sel_seen[2] || sel_seen[-1] != ~sel_seen[-2]) begin
      failures++; $display("SEL coding is not inverse between single and double");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
