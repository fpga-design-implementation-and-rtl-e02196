// Self-checking test of csa: sum + carry + cout*2^W == a + b + c + cin.
module tb_csa;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, c, sum, carry;
  logic cin, cout;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 1000; r++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if (int'(sum) + int'(carry) + (int'(cout) << W) != int'(a) + int'(b) + int'(c) + int'(cin)
          || carry[0] !== cin) begin
        failures++; $display("a=%h b=%h c=%h cin=%b -> %h %h %b", a, b, c, cin, sum, carry, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
