// Radix-4 processing element: one iteration of the word-serial Montgomery
// multiplication, S' = (S + qa*B + qm*M) / 4, for one recoded multiplier
// digit qa.
//
// Words of B, M and the carry-save partial sum (SS, SC) enter one per cycle,
// least significant first, with the flags in_first / in_last; the hidden bit
// h_in of the previous iteration comes with the first word. A register
// (the stage register) splits the PE into two sections that work on
// consecutive words:
//   First section (the word now at the inputs):
//   * the Booth triple of this stage's digit, loaded from the broadcast A
//     bus when a_load is high (the cycle before the first word), is recoded
//     into the PP controls, which pass a glitch blocker (clock-low latch);
//   * a PP generator forms bits 1:0 of the word of qa*B and CSA0 adds them
//     to SS[1:0] + SC[1:0]; its carry-in is NEG_pp on the first word (the +1
//     of a negative PP), otherwise the carry out of CSA1 for the previous
//     word, which the second section is processing in the same cycle;
//   * the CS converter forms sp = (S + PP + h) mod 4 for the recoder.
//   Second section (one cycle later, the same word, from the register):
//   * a second PP generator forms bits W-1:2 and CSA1 adds them to
//     SS[W-1:2] + SC[W-1:2]; the result is joined with CSA0's bits;
//   * on the first word the Montgomery recoder turns sp and bit 1 of M into
//     qm (held for the rest of the iteration); its controls pass a glitch
//     blocker and the PM generator forms the word of qm*M;
//   * CSA2 adds it, with carry-in NEG_pm on the first word;
//   * shift_align divides by four and drives the outputs combinationally.
// B and M pass the stage register and one more register, so they leave with
// the S word of the same index. Word i enters at cycle t+i and leaves in
// cycle t+i+2, so the next stage starts two cycles later; a_load_next tells
// it to load its digit in the cycle before its first word.
// The two-section structure, the recoders, glitch blockers, SEL freezing and
// the carry-in multiplexers follow the published PE; the handling of the
// hidden bit and of the top word is this design's own reading.
module pe
  import mwr4mm_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_load,
  input  logic [2:0]   a_trip,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [W-1:0] b_in,
  input  logic [W-1:0] m_in,
  input  logic [W-1:0] ss_i,
  input  logic [W-1:0] sc_i,
  input  logic         h_in,
  output logic         a_load_next,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [W-1:0] b_out,
  output logic [W-1:0] m_out,
  output logic [W-1:0] ss_o,
  output logic [W-1:0] sc_o,
  output logic         h_out
);
  // ---------------- first section ----------------
  logic [2:0]   trip_q;
  mult_ctrl_t   pp_raw, pp_ctrl;
  logic [W-1:0] pp_lo_word;
  logic         b_msb_q, cin0, csa1_cout;
  logic [1:0]   sum0, carry0, sp;
  logic         cout0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      trip_q <= '0;
    else if (a_load) trip_q <= a_trip;

  booth_recoder u_booth (.clk, .rst_n, .trip(trip_q), .ctrl(pp_raw));
  glitch_blocker #(.WIDTH(3)) u_gb_pp (.clk, .d(pp_raw), .q(pp_ctrl));

  multiple_generator #(.W(W)) u_ppgen_lo (
    .x(b_in), .x_prev_msb(in_first ? 1'b0 : b_msb_q), .ctrl(pp_ctrl), .y(pp_lo_word));

  assign cin0 = in_first ? (pp_ctrl.neg & pp_ctrl.en) : csa1_cout;
  csa #(.W(2)) u_csa0 (.a(ss_i[1:0]), .b(sc_i[1:0]), .c(pp_lo_word[1:0]), .cin(cin0),
                       .sum(sum0), .carry(carry0), .cout(cout0));

  cs_converter u_csconv (.sum_lo(sum0), .carry_lo(carry0), .hidden(h_in), .sp(sp));

  // ---------------- stage register ----------------
  logic         v_m, f_m, l_m, h_m;
  logic [W-1:0] b_m, m_m;
  logic [W-1:2] ss_m, sc_m;
  logic [1:0]   sum0_m, sp_m;
  logic [2:0]   carry0_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_m <= 1'b0; f_m <= 1'b0; l_m <= 1'b0; h_m <= 1'b0; b_msb_q <= 1'b0;
      b_m <= '0; m_m <= '0; ss_m <= '0; sc_m <= '0; sum0_m <= '0; sp_m <= '0; carry0_m <= '0;
    end else begin
      v_m <= in_valid; f_m <= in_valid && in_first; l_m <= in_valid && in_last;
      h_m <= h_in;
      b_m <= b_in; m_m <= m_in;
      ss_m <= ss_i[W-1:2]; sc_m <= sc_i[W-1:2];
      sum0_m <= sum0; carry0_m <= {cout0, carry0}; sp_m <= sp;
      if (in_valid) b_msb_q <= b_in[W-1];
    end
  end

  // ---------------- second section ----------------
  logic [W-1:0] pp_hi_word, pm, sum_a, carry_a, sum_b, carry_b;
  logic [W-1:2] sum1, carry1;
  mult_ctrl_t   pm_raw, pm_ctrl;
  logic         m_msb_q, cb_q, cin_b, cout_b;

  // bits W-1:2 of a doubled word only use bits of the same word
  multiple_generator #(.W(W)) u_ppgen_hi (
    .x(b_m), .x_prev_msb(1'b0), .ctrl(pp_ctrl), .y(pp_hi_word));

  csa #(.W(W-2)) u_csa1 (.a(ss_m), .b(sc_m), .c(pp_hi_word[W-1:2]), .cin(1'b0),
                         .sum(sum1), .carry(carry1), .cout(csa1_cout));

  assign sum_a   = {sum1, sum0_m};
  assign carry_a = {carry1[W-1:3], carry0_m};

  montgomery_recoder u_mont (.clk, .rst_n, .capture(v_m && f_m),
                             .sp(sp_m), .m1(m_m[1]), .ctrl(pm_raw));
  glitch_blocker #(.WIDTH(3)) u_gb_pm (.clk, .d(pm_raw), .q(pm_ctrl));

  multiple_generator #(.W(W)) u_pmgen (
    .x(m_m), .x_prev_msb(f_m ? 1'b0 : m_msb_q), .ctrl(pm_ctrl), .y(pm));

  assign cin_b = f_m ? (pm_ctrl.neg & pm_ctrl.en) : cb_q;
  csa #(.W(W)) u_csa2 (.a(sum_a), .b(carry_a), .c(pm), .cin(cin_b),
                       .sum(sum_b), .carry(carry_b), .cout(cout_b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb_q <= 1'b0; m_msb_q <= 1'b0; b_out <= '0; m_out <= '0;
    end else begin
      if (v_m) begin
        cb_q    <= cout_b;
        m_msb_q <= m_m[W-1];
      end
      b_out <= b_m;
      m_out <= m_m;
    end
  end

  shift_align #(.W(W)) u_shift (
    .clk, .rst_n, .in_valid(v_m), .in_first(f_m), .in_last(l_m),
    .ss_new(sum_b), .sc_new(carry_b), .h_in(h_m),
    .ss_o, .sc_o, .h_out, .out_valid, .out_first, .out_last);

  assign a_load_next = v_m && f_m;
endmodule
