// Self-checking test of montgomery_recoder: for every (sp, m1) the digit qm
// lies in {-1,0,+1,+2} and makes sp + qm*M a multiple of 4 (M = 1 or 3 mod 4);
// the digit stays constant while capture is low; SEL is frozen for qm = 0.
module tb_montgomery_recoder;
  import mwr4mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, capture = 1'b0, m1 = 1'b0;
  logic [1:0] sp = '0;
  mult_ctrl_t ctrl;
  int checks = 0, failures = 0;

  montgomery_recoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int q, mm;
    mult_ctrl_t held;
    logic prev_sel;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      prev_sel = ctrl.sel;
      capture = 1'b1; sp = 2'($urandom); m1 = 1'($urandom);
      #1;
      q = ctrl_value(ctrl);
      mm = m1 ? 3 : 1;
      checks++;
      if (q < -1 || q > 2 || ((int'(sp) + q * mm) % 4 + 4) % 4 != 0) begin
        failures++; $display("sp=%b m1=%b qm=%0d", sp, m1, q);
      end
      if (q == 0) begin
        checks++; if (ctrl.sel !== prev_sel) begin failures++; $display("SEL not frozen"); end
      end
      held = ctrl;
      // the held value must survive changes of the inputs while capture is low
      repeat (3) begin
        @(negedge clk);
        capture = 1'b0; sp = 2'($urandom); m1 = 1'($urandom);
        #1;
        checks++; if (ctrl !== held) begin failures++; $display("digit not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
