// Self-checking test of the PE pipeline with NS = 3 stages, E = 5 words of
// W = 8 bits. One pass applies three digits (or two, with last_stage = 1) to
// a random partial sum; the result must equal three (two) reference
// iterations S <- (S + qa*B + qm*M)/4, and the first output word must leave
// 2 cycles per active stage after the first input word. The digit bus is
// driven the way the kernel control drives it: stage s's triple is on the bus
// in the cycle 2s after a_load.
module tb_kernel_datapath;
  localparam int unsigned W = 8, E = 5, XW = W * E, NS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_load = 1'b0, in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0, h_in = 1'b0;
  logic [2:0] a_trip = '0;
  logic [$clog2(NS+1)-1:0] last_stage = 2;
  logic [W-1:0] b_in = '0, m_in = '0, ss_i = '0, sc_i = '0, ss_o, sc_o;
  logic out_valid, out_first, out_last, h_out;
  int checks = 0, failures = 0;

  kernel_datapath #(.W(W), .NS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [XW-1:0] oss, osc;
  logic oh;
  int nout, cyc, in_cyc, first_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      oss[nout*W +: W] <= ss_o; osc[nout*W +: W] <= sc_o;
      if (out_first) begin oh <= h_out; first_cyc <= cyc; end
      nout <= nout + 1;
    end
  end

  initial begin
    longint m, b, s, hv, qa, qm, t, got;
    logic [XW-1:0] ssv, scv;
    logic [2:0] tr [NS];
    int l;
    cyc = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 200; r++) begin
      l = (r % 4 == 3) ? 2 : 3;
      last_stage <= 2'(l - 1);
      m  = (((longint'($urandom) << 3) | 1) % (longint'(1) << 35)) | 1;
      b  = ((longint'($urandom) << 3) ^ longint'($urandom)) % m;
      s  = ((longint'($urandom) << 3) ^ longint'($urandom)) % m;
      if ($urandom_range(1, 0) == 1) s = -s;
      hv = longint'($urandom_range(1, 0));
      ssv = XW'({$urandom, $urandom});
      scv = XW'(s - hv) - ssv;
      t = s;
      for (int k = 0; k < l; k++) begin
        tr[k] = 3'($urandom);
        qa = -2 * longint'(tr[k][2]) + longint'(tr[k][1]) + longint'(tr[k][0]);
        for (qm = -1; qm <= 2; qm++) if ((((t + qa * b + qm * m) % 4) + 4) % 4 == 0) break;
        t = (t + qa * b + qm * m) / 4;
      end
      nout = 0;
      @(posedge clk);
      for (int c = 0; c <= int'(E) + 2 * int'(NS) + 2; c++) begin
        a_load   <= (c == 0);
        a_trip   <= (c % 2 == 0 && c / 2 < int'(NS)) ? tr[c/2] : 3'($urandom);
        in_valid <= (c >= 1 && c <= int'(E));
        in_first <= (c == 1);
        in_last  <= (c == int'(E));
        if (c >= 1 && c <= int'(E)) begin
          b_in <= W'(XW'(b) >> ((c-1)*W)); m_in <= W'(XW'(m) >> ((c-1)*W));
          ss_i <= ssv[(c-1)*W +: W]; sc_i <= scv[(c-1)*W +: W]; h_in <= (c == 1) ? hv[0] : 1'b0;
        end
        if (c == 1) in_cyc = cyc;
        @(posedge clk);
      end
      in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0; a_load <= 1'b0;
      repeat (2) @(posedge clk);
      got = longint'($signed(oss + osc + XW'(oh)));
      checks++;
      if (nout != int'(E) || got != t) begin
        failures++; $display("L=%0d s=%0d: got %0d exp %0d words %0d", l, s, got, t, nout);
      end
      checks++;
      if (first_cyc != in_cyc + 2 * l + 1) begin
        failures++; $display("latency %0d expected %0d", first_cyc - in_cyc, 2 * l + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
