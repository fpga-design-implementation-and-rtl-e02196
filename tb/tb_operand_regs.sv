// Self-checking test of operand_regs (N = 32, W = 8, E = 5): loaded words of
// A, B and M read back on the kernel port; every digit's Booth triple equals
// (a[2j+1], a[2j], a[2j-1]) with a[-1] = 0 and digits past N/2 read 000;
// kernel write-back of SS/SC and the hidden bit reads back on the kernel and
// converter ports; result words read back on the user port.
module tb_operand_regs;
  import mwr4mm_pkg::*;
  localparam int unsigned N = 32, W = 8;
  localparam int unsigned E = num_words(N, W), AW = $clog2(E), DW = $clog2(N/2 + 1) + 1;
  logic clk = 1'b0;
  logic ld_we = 1'b0, kw_we = 1'b0, kw_h_we = 1'b0, kw_h = 1'b0, res_we = 1'b0;
  operand_e ld_sel = OP_A;
  logic [AW-1:0] ld_addr = '0, k_addr = '0, kw_addr = '0, cv_addr = '0, res_addr = '0, rd_addr = '0;
  logic [W-1:0] ld_data = '0, kw_ss = '0, kw_sc = '0, res_data = '0;
  logic [W-1:0] k_b, k_m, k_ss, k_sc, cv_ss, cv_sc, rd_data;
  logic k_h;
  logic [DW-1:0] dig_idx = '0;
  logic [2:0] dig_trip;
  int checks = 0, failures = 0;

  operand_regs #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [E*W-1:0] av, bv, mv, sv, cv, rv;
    for (int r = 0; r < 20; r++) begin
      av = {$urandom, $urandom}; bv = {$urandom, $urandom}; mv = {$urandom, $urandom};
      av[E*W-1:N] = '0;
      sv = {$urandom, $urandom}; cv = {$urandom, $urandom}; rv = {$urandom, $urandom};
      for (int i = 0; i < int'(E); i++) begin
        @(negedge clk); ld_we = 1; ld_sel = OP_A; ld_addr = AW'(i); ld_data = av[i*W +: W];
        @(negedge clk); ld_sel = OP_B; ld_data = bv[i*W +: W];
        @(negedge clk); ld_sel = OP_M; ld_data = mv[i*W +: W];
        @(negedge clk); ld_we = 0;
        kw_we = 1; kw_addr = AW'(i); kw_ss = sv[i*W +: W]; kw_sc = cv[i*W +: W];
        kw_h_we = (i == 0); kw_h = av[0];
        res_we = 1; res_addr = AW'(i); res_data = rv[i*W +: W];
        @(negedge clk); kw_we = 0; kw_h_we = 0; res_we = 0;
      end
      for (int i = 0; i < int'(E); i++) begin
        k_addr = AW'(i); cv_addr = AW'(E - 1 - i); rd_addr = AW'(i); #1;
        chk(k_b == bv[i*W +: W] && k_m == mv[i*W +: W], "B/M read");
        chk(k_ss == sv[i*W +: W] && k_sc == cv[i*W +: W], "SS/SC kernel read");
        chk(cv_ss == sv[(E-1-i)*W +: W] && cv_sc == cv[(E-1-i)*W +: W], "SS/SC converter read");
        chk(rd_data == rv[i*W +: W], "result read");
      end
      chk(k_h == av[0], "hidden bit");
      for (int j = 0; j < int'(N/2) + 2; j++) begin
        dig_idx = DW'(j); #1;
        if (j < int'(N/2)) chk(dig_trip == {av[2*j+1], av[2*j], (j == 0) ? 1'b0 : av[2*j-1]}, "digit triple");
        else               chk(dig_trip == 3'b000, "digit past the operand");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
