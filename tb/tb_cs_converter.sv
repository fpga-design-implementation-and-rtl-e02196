// Exhaustive self-checking test of cs_converter: sp = (sum + carry + h) mod 4.
module tb_cs_converter;
  logic [1:0] sum_lo, carry_lo, sp;
  logic hidden;
  int checks = 0, failures = 0;

  cs_converter dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {sum_lo, carry_lo, hidden} = 5'(i);
      #1;
      checks++;
      if (int'(sp) != (int'(sum_lo) + int'(carry_lo) + int'(hidden)) % 4) begin
        failures++; $display("%b %b %b -> %b", sum_lo, carry_lo, hidden, sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
