// Self-checking test of glitch_blocker: while the clock is high, changes of d
// (glitches) do not reach q; while it is low, q follows d.
module tb_glitch_blocker;
  logic clk = 1'b1;
  logic [2:0] d = '0, q;
  int checks = 0, failures = 0;

  glitch_blocker #(.WIDTH(3)) dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] held;
    for (int r = 0; r < 100; r++) begin
      clk = 1'b0; #1;
      d = 3'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("not transparent while clock low"); end
      d = 3'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("not transparent while clock low"); end
      held = q;
      clk = 1'b1; #1;
      repeat (3) begin
        d = 3'($urandom); #1;
        checks++; if (q !== held) begin failures++; $display("glitch passed while clock high"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
