// Self-checking test of one radix-4 PE with E = 5 words of W = 8 bits
// (operands of up to 35 bits). For random odd M, B < M, a random signed
// partial sum S (|S| < 4M/3, random carry-save split and hidden bit) and a
// random Booth triple, the PE must produce S' = (S + qa*B + qm*M)/4, where
// qa is the Booth digit of the triple and qm is the only value in
// {-1,0,+1,+2} that makes the sum divisible by 4. Also checked: the output
// stream starts two cycles after the input stream, and a_load_next pulses in
// the cycle before the next stage's first word.
module tb_pe;
  localparam int unsigned W = 8, E = 5, XW = W * E;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_load = 1'b0, in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0, h_in = 1'b0;
  logic [2:0] a_trip = '0;
  logic [W-1:0] b_in = '0, m_in = '0, ss_i = '0, sc_i = '0;
  logic a_load_next, out_valid, out_first, out_last, h_out;
  logic [W-1:0] b_out, m_out, ss_o, sc_o;
  int checks = 0, failures = 0;

  pe #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [XW-1:0] oss, osc, ob, om;
  logic oh;
  int nout, cyc, in_cyc, ld_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && a_load_next) ld_cyc <= cyc;
    if (rst_n && out_valid) begin
      oss[nout*W +: W] <= ss_o; osc[nout*W +: W] <= sc_o;
      ob[nout*W +: W] <= b_out; om[nout*W +: W] <= m_out;
      if (out_first) begin
        oh <= h_out;
        checks++;
        if (ld_cyc != cyc - 1) begin failures++; $display("a_load_next not one cycle before word 0"); end
      end
      checks++;
      if (cyc != in_cyc + nout + 3) begin failures++; $display("word %0d late/early", nout); end
      nout <= nout + 1;
    end
  end

  initial begin
    longint m, b, s, hv, qa, qm, t, got;
    logic [XW-1:0] ssv, scv;
    logic [2:0] tr;
    cyc = 0; ld_cyc = -10;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 300; r++) begin
      m  = ((longint'($urandom) << 3) | 1) % (longint'(1) << 35);
      m  = m | 1;
      b  = ((longint'($urandom) << 3) ^ longint'($urandom)) % m;
      s  = ((longint'($urandom) << 3) ^ longint'($urandom)) % (m + m / 3);
      if ($urandom_range(1, 0) == 1) s = -s;
      hv = longint'($urandom_range(1, 0));
      tr = 3'($urandom);
      qa = -2 * longint'(tr[2]) + longint'(tr[1]) + longint'(tr[0]);
      for (qm = -1; qm <= 2; qm++) if ((((s + qa * b + qm * m) % 4) + 4) % 4 == 0) break;
      t = (s + qa * b + qm * m) / 4;
      ssv = XW'({$urandom, $urandom});
      scv = XW'(s - hv) - ssv;
      nout = 0;
      @(posedge clk);
      a_load <= 1'b1; a_trip <= tr;
      @(posedge clk);
      a_load <= 1'b0; a_trip <= 3'($urandom);
      in_cyc = cyc;
      for (int i = 0; i < int'(E); i++) begin
        in_valid <= 1'b1; in_first <= (i == 0); in_last <= (i == int'(E) - 1);
        b_in <= W'(XW'(b) >> (i*W)); m_in <= W'(XW'(m) >> (i*W));
        ss_i <= ssv[i*W +: W]; sc_i <= scv[i*W +: W]; h_in <= (i == 0) ? hv[0] : 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
      repeat (4) @(posedge clk);
      got = longint'($signed(oss + osc + XW'(oh)));
      checks++;
      if (nout != int'(E) || got != t || ob != XW'(b) || om != XW'(m)) begin
        failures++; $display("s=%0d b=%0d m=%0d qa=%0d: got %0d exp %0d", s, b, m, qa, got, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
