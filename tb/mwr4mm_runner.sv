// Test helper: runs NT random multiplications on one mwr4mm_top instance of
// the given size and checks each result against a wide-integer reference
// (congruence with A*B*2^-N mod M, range (-M, 4M/3)) and the latency formula.
// Reports its check and failure counts and raises finished when done.
module mwr4mm_runner
  import mwr4mm_pkg::*;
#(
  parameter int unsigned N  = 1024,
  parameter int unsigned W  = 8,
  parameter int unsigned NS = 16,
  parameter int unsigned NT = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned E  = num_words(N, W);
  localparam int unsigned AW = $clog2(E);
  localparam int unsigned XW = E * W;
  typedef logic [2*XW+8:0] wide_t;

  logic          ld_valid = 1'b0, start = 1'b0, busy, done;
  operand_e      ld_sel = OP_A;
  logic [AW-1:0] ld_addr = '0, rd_addr = '0;
  logic [W-1:0]  ld_data = '0, rd_data;

  mwr4mm_top #(.N(N), .W(W), .NS(NS)) dut (.*);

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
    wide_t a, b, m;
    finished = 1'b0; checks = 0; failures = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int t = 0; t < int'(NT); t++) begin
      m = rand_bits(N - 1) | 1 | (wide_t'(1) << (N - 2));
      a = rand_bits(N - 1);
      b = rand_bits(N - 1) % m;
      run_one(a, b, m);
    end
    finished = 1'b1;
  end
endmodule
