// End-to-end test of the Montgomery multiplier at reduced size.
//
// Loads random operands (M odd, M < 2^(N-1), A < 2^(N-1), B < M) plus a few
// corner cases through the load port, runs a multiplication, reads the
// result back and checks it against a reference computed here with wide
// integer arithmetic: RES = A*B*2^-N mod M (congruence) and -M < RES < 4M/3.
// It also checks the latency against P passes of E + 2L + 1 cycles plus the
// conversion, and counts how often each mechanism of the design occurred:
// every Booth digit value, every Montgomery digit value, a held (frozen) SEL,
// a set hidden bit, a negative result and a shortened final pass.
// N = 64, NS = 5 gives 32 digits in 7 passes, the last using 2 stages.
module tb_mwr4mm_top;
  import mwr4mm_pkg::*;
  localparam int unsigned N  = 64;
  localparam int unsigned W  = 8;
  localparam int unsigned NS = 5;
  localparam int unsigned E  = num_words(N, W);
  localparam int unsigned AW = $clog2(E);
  localparam int unsigned NT = 40;
  localparam int unsigned XW = E * W;
  typedef logic [2*XW+8:0] wide_t;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          ld_valid = 1'b0, start = 1'b0, busy, done;
  operand_e      ld_sel = OP_A;
  logic [AW-1:0] ld_addr = '0, rd_addr = '0;
  logic [W-1:0]  ld_data = '0, rd_data;

  int checks = 0, failures = 0;
  int cnt_qa[5];     // -2..+2
  int cnt_qm[4];     // -1..+2
  int cnt_freeze = 0, cnt_hidden = 0, cnt_neg = 0, cnt_short = 0;

  mwr4mm_top #(.N(N), .W(W), .NS(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (stage 0 and the kernel control) ----
  always @(posedge clk) begin
    if (dut.u_kdp.g_stage[0].u_pe.in_valid && dut.u_kdp.g_stage[0].u_pe.in_first) begin
      cnt_qa[ctrl_value(dut.u_kdp.g_stage[0].u_pe.pp_raw) + 2]++;
      cnt_qm[ctrl_value(dut.u_kdp.g_stage[0].u_pe.pm_raw) + 1]++;
      if (!dut.u_kdp.g_stage[0].u_pe.pp_raw.en) cnt_freeze++;
    end
    if (dut.u_kdp.g_stage[0].u_pe.out_first && dut.u_kdp.g_stage[0].u_pe.h_out) cnt_hidden++;
    if (dut.u_kctl.a_load && dut.u_kctl.last_stage != ($bits(dut.u_kctl.last_stage))'(NS - 1))
      cnt_short++;
  end

  function automatic wide_t ref_mont(wide_t a, wide_t b, wide_t m);
    wide_t r;
    r = (a * b) % m;
    for (int i = 0; i < int'(N); i++) r = r[0] ? (r + m) >> 1 : r >> 1;
    return r;
  endfunction

  task automatic load(operand_e sel, wide_t v);
    for (int i = 0; i < int'(E); i++) begin
      @(posedge clk);
      ld_valid <= 1'b1; ld_sel <= sel; ld_addr <= AW'(i); ld_data <= v[i*W +: W];
    end
    @(posedge clk);
    ld_valid <= 1'b0;
  endtask

  function automatic wide_t rand_bits(int nb);
    wide_t v = '0;
    for (int i = 0; i < nb; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic run_one(wide_t a, wide_t b, wide_t m);
    wide_t        expv, res_u, rmod;
    logic [XW-1:0] res;
    logic signed [XW:0] res_s;
    int cyc, exp_cyc;
    load(OP_A, a); load(OP_B, b); load(OP_M, m);
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    // passes: (P-1) full passes of E+2NS+1 cycles, one of E+2L+1, then
    // E cycles of conversion and one of done, plus the start cycle
    exp_cyc = 0;
    for (int p = 0; p < int'((N/2 + NS - 1) / NS); p++) begin
      int l = (N/2 - p * NS < NS) ? int'(N/2 - p * NS) : int'(NS);
      exp_cyc += int'(E) + 2 * l + 1;
    end
    exp_cyc += int'(E) + 3;
    checks++;
    if (cyc != exp_cyc) begin
      failures++; $display("latency %0d expected %0d", cyc, exp_cyc);
    end
    for (int i = 0; i < int'(E); i++) begin
      rd_addr = AW'(i); #1; res[i*W +: W] = rd_data;
    end
    res_s = {res[XW-1], res};
    if (res_s < 0) cnt_neg++;
    expv = ref_mont(a, b, m);
    // reduce the signed result into [0, M)
    if (res_s < 0) res_u = wide_t'(-res_s); else res_u = wide_t'(res_s);
    rmod = res_u % m;
    if (res_s < 0 && rmod != 0) rmod = m - rmod;
    checks++;
    if (rmod != expv) begin
      failures++;
      $display("MISMATCH a=%h b=%h m=%h res=%h exp=%h", a, b, m, res, expv);
    end
    checks++;
    if (!(res_s < 0 ? (res_u < m) : (3 * res_u < 4 * m))) begin
      failures++; $display("RANGE a=%h b=%h m=%h res=%h", a, b, m, res);
    end
    @(posedge clk);
  endtask

  initial begin : main
    wide_t a, b, m, top;
    top = wide_t'(1) << (N - 1);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // corner cases: largest operands, zero, one
    m = top - 1;                         run_one(top - 1, m - 1, m);
    m = rand_bits(N - 1) | 1 | (top >> 1); run_one('0, m - 1, m);
    m = rand_bits(N - 1) | 1;            run_one(1, 1, m);
    m = 3;                               run_one(top - 1, 2, m);
    for (int t = 0; t < int'(NT); t++) begin
      m = rand_bits(N - 1) | 1;
      if (m < 3) m = 3;
      a = rand_bits(N - 1);
      b = rand_bits(N - 1) % m;
      run_one(a, b, m);
    end
    for (int i = 0; i < 5; i++) begin
      checks++; if (cnt_qa[i] == 0) begin failures++; $display("Booth digit %0d never seen", i - 2); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++; if (cnt_qm[i] == 0) begin failures++; $display("Montgomery digit %0d never seen", i - 1); end
    end
    checks++; if (cnt_freeze == 0) begin failures++; $display("SEL freeze never seen"); end
    checks++; if (cnt_hidden == 0) begin failures++; $display("hidden bit never set"); end
    checks++; if (cnt_neg == 0)    begin failures++; $display("no negative result"); end
    checks++; if (cnt_short == 0)  begin failures++; $display("no shortened pass"); end
    $display("mechanisms: qa=%p qm=%p freeze=%0d hidden=%0d negative=%0d short_pass=%0d",
             cnt_qa, cnt_qm, cnt_freeze, cnt_hidden, cnt_neg, cnt_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
