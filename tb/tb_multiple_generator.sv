// Self-checking test of multiple_generator: a random two-word number X is
// passed word by word; the words produced, plus the carry-in of 1 for a
// negative multiple, must add up to k*X mod 2^(2W) for every k in -2..2.
module tb_multiple_generator;
  import mwr4mm_pkg::*;
  localparam int unsigned W = 8;
  logic [W-1:0] x, y;
  logic         x_prev_msb;
  mult_ctrl_t   ctrl;
  int checks = 0, failures = 0;

  multiple_generator #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2*W-1:0] xv, got, expv;
    for (int r = 0; r < 500; r++) begin
      xv = {1'b0, (2*W-1)'($urandom)};
      ctrl = mult_ctrl_t'($urandom);
      x = xv[W-1:0]; x_prev_msb = 1'b0; #1; got[W-1:0] = y;
      x = xv[2*W-1:W]; x_prev_msb = xv[W-1]; #1; got[2*W-1:W] = y;
      got = got + ((ctrl.en && ctrl.neg) ? 1 : 0);
      expv = (2*W)'(ctrl_value(ctrl) * int'(xv));
      checks++;
      if (got !== expv) begin
        failures++; $display("x=%h k=%0d got %h exp %h", xv, ctrl_value(ctrl), got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
