// Self-checking test of kernel_control driving the real register file and a
// 3-stage PE pipeline, with N = 32, W = 8 (E = 5 words): 16 digits in 6
// passes, the last of which uses one stage. Checked: the carry-save result
// left in the registers is congruent to A*B*2^-N mod M; every stage loads
// the triple of digit pass*NS + stage; the number of passes; the cycle count
// from start to done (sum of E + 2L + 1 over the passes, plus two: the start
// cycle and the done cycle).
module tb_kernel_control;
  import mwr4mm_pkg::*;
  localparam int unsigned N = 32, W = 8, NS = 3;
  localparam int unsigned E = num_words(N, W), AW = $clog2(E), XW = E * W;
  localparam int unsigned DW = $clog2(N/2 + 1) + 1, SW = $clog2(NS + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic ld_we = 1'b0;
  operand_e ld_sel = OP_A;
  logic [AW-1:0] ld_addr = '0, k_addr, kw_addr, cv_addr = '0, rd_addr = '0;
  logic [W-1:0] ld_data = '0, k_b, k_m, k_ss, k_sc, cv_ss, cv_sc, rd_data, ss_o, sc_o;
  logic [W-1:0] b_in, m_in, ss_i, sc_i;
  logic k_h, kw_we, kw_h_we, h_in, h_out, a_load, in_valid, in_first, in_last;
  logic out_valid, out_first, out_last;
  logic [DW-1:0] dig_idx;
  logic [2:0] dig_trip, a_trip;
  logic [SW-1:0] last_stage;
  int checks = 0, failures = 0;

  operand_regs #(.N(N), .W(W)) u_regs (
    .clk, .ld_we, .ld_sel, .ld_addr, .ld_data, .k_addr, .k_b, .k_m, .k_ss, .k_sc, .k_h,
    .dig_idx, .dig_trip, .kw_we, .kw_addr, .kw_ss(ss_o), .kw_sc(sc_o), .kw_h_we, .kw_h(h_out),
    .cv_addr, .cv_ss, .cv_sc, .res_we(1'b0), .res_addr('0), .res_data('0), .rd_addr, .rd_data);
  kernel_control #(.N(N), .W(W), .NS(NS)) dut (.*);
  kernel_datapath #(.W(W), .NS(NS)) u_kdp (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // digit loading: stage s loads on its a_load; the bus must then carry
  // digit pass*NS + s of A
  longint a_cur;
  int npass, load_err;
  always @(posedge clk) begin : mon
    int j;
    logic [2:0] exp_t;
    for (int s = 0; s < int'(NS); s++) begin
      if (u_kdp.ld[s]) begin
        j = int'(dut.pass) * int'(NS) + s;
        exp_t = (j < int'(N/2)) ? 3'((({a_cur, 1'b0}) >> (2*j)) & 7) : 3'b000;
        if (s <= int'(last_stage) && a_trip != exp_t) load_err++;
      end
    end
    if (a_load) npass++;
  end

  task automatic load(operand_e sel, longint v);
    for (int i = 0; i < int'(E); i++) begin
      @(posedge clk);
      ld_we <= 1'b1; ld_sel <= sel; ld_addr <= AW'(i); ld_data <= W'(v >> (i*W));
    end
    @(posedge clk); ld_we <= 1'b0;
  endtask

  initial begin
    longint a, b, m, r, got, expc;
    logic [XW-1:0] ssv, scv;
    int cyc, expcyc, l;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 30; t++) begin
      m = (longint'($urandom) % (longint'(1) << (N - 1))) | 1;
      a = longint'($urandom) % (longint'(1) << (N - 1));
      b = longint'($urandom) % m;
      a_cur = a; npass = 0; load_err = 0;
      load(OP_A, a); load(OP_B, b); load(OP_M, m);
      @(posedge clk); start <= 1'b1;
      @(posedge clk); start <= 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      expcyc = 2;
      for (int p = 0; p < int'((N/2 + NS - 1) / NS); p++) begin
        l = (int'(N/2) - p * int'(NS) < int'(NS)) ? int'(N/2) - p * int'(NS) : int'(NS);
        expcyc += int'(E) + 2 * l + 1;
      end
      @(posedge clk);
      for (int i = 0; i < int'(E); i++) begin
        cv_addr = AW'(i); #1; ssv[i*W +: W] = cv_ss; scv[i*W +: W] = cv_sc;
      end
      got = longint'($signed(ssv + scv + XW'(k_h)));
      r = (a * b) % m;
      for (int i = 0; i < int'(N); i++) r = (r % 2 == 1) ? (r + m) / 2 : r / 2;
      expc = ((got % m) + m) % m;
      checks++; if (expc != r) begin failures++; $display("a=%0d b=%0d m=%0d got %0d exp %0d", a, b, m, got, r); end
      checks++; if (npass != int'((N/2 + NS - 1) / NS)) begin failures++; $display("%0d passes", npass); end
      checks++; if (load_err != 0) begin failures++; $display("%0d wrong digit loads", load_err); end
      checks++; if (cyc != expcyc) begin failures++; $display("cycles %0d expected %0d", cyc, expcyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
