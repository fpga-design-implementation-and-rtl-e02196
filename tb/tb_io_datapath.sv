// Self-checking test of io_datapath with E = 5 words of W = 8 bits: random
// carry-save words and hidden bit converted word by word must give the
// binary words of SS + SC + h mod 2^40.
module tb_io_datapath;
  localparam int unsigned W = 8, E = 5, XW = W * E;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, first = 1'b0, h = 1'b0;
  logic [W-1:0] ss = '0, sc = '0, res;
  int checks = 0, failures = 0;

  io_datapath #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [XW-1:0] sv, cv, expv, got;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 300; r++) begin
      sv = {$urandom, $urandom}; cv = {$urandom, $urandom};
      if (r % 3 == 0) cv = ~sv;       // long carry chains
      @(negedge clk);
      h = 1'($urandom);
      expv = sv + cv + XW'(h);
      for (int i = 0; i < int'(E); i++) begin
        valid = 1'b1; first = (i == 0); ss = sv[i*W +: W]; sc = cv[i*W +: W];
        #1; got[i*W +: W] = res;
        @(negedge clk);
      end
      valid = 1'b0; first = 1'b0;
      checks++;
      if (got != expv) begin failures++; $display("%h + %h + %b: got %h", sv, cv, h, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
