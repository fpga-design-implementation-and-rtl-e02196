// Self-checking test of shift_align with E = 5 words of W = 8 bits.
// A random value V (a multiple of 4, |V| < 2^37) is split into random
// carry-save halves SS, SC and a hidden bit h with SS + SC + h = V
// (mod 2^40); the stream must leave as V/4 in the same form, word k one
// cycle after it entered, with first/last flags on words 0 and E-1.
module tb_shift_align;
  localparam int unsigned W = 8, E = 5, XW = W * E;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0, h_in = 1'b0;
  logic [W-1:0] ss_new = '0, sc_new = '0, ss_o, sc_o;
  logic h_out, out_valid, out_first, out_last;
  int checks = 0, failures = 0;

  shift_align #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [XW-1:0] ss_v, sc_v, oss, osc;
  logic          oh;
  int            nout, in_cyc, cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      oss[nout*W +: W] <= ss_o;
      osc[nout*W +: W] <= sc_o;
      if (out_first) oh <= h_out;
      checks++;
      if (out_first != (nout == 0) || out_last != (nout == int'(E) - 1) ||
          cyc != in_cyc + nout + 2) begin
        failures++; $display("flags/timing wrong at word %0d: cyc %0d in %0d f%b l%b", nout, cyc, in_cyc, out_first, out_last);
      end
      nout <= nout + 1;
    end
  end

  initial begin
    longint v, got, hv;
    cyc = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 200; r++) begin
      v = (longint'($urandom) << 5) ^ longint'($urandom);
      v = (v % (longint'(1) << 37)) * 4 / 4;
      v = v - (v % 4);
      hv = longint'($urandom_range(1, 0));
      ss_v = XW'({$urandom, $urandom});
      sc_v = XW'(v - hv) - ss_v;
      nout = 0;
      @(posedge clk);
      in_cyc = cyc;
      for (int i = 0; i < int'(E); i++) begin
        in_valid <= 1'b1; in_first <= (i == 0); in_last <= (i == int'(E) - 1);
        ss_new <= ss_v[i*W +: W]; sc_new <= sc_v[i*W +: W]; h_in <= (i == 0) ? hv[0] : 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
      repeat (3) @(posedge clk);
      got = longint'($signed(oss + osc + XW'(oh)));
      checks++;
      if (nout != int'(E) || got != v / 4) begin
        failures++; $display("V=%0d got %0d (words %0d)", v, got, nout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
