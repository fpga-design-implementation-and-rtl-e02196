// Shift and alignment: the last block of a PE's second section.
//
// Each iteration ends with S' = (S + qa*B + qm*M) / 4. The new partial sum
// arrives one word per cycle in carry-save form (ss_new, sc_new), least
// significant word first. The division by four is a two-bit right shift
// across word boundaries: output word i-1 is built from the low two bits of
// word i and the high W-2 bits of word i-1, so the block keeps the previous
// word in registers and emits word i-1 while word i arrives.
//   * First word: the low two bits of the sum are a multiple of 4 by choice
//     of qm, but only after the hidden bit h_in of the previous iteration is
//     added; (ss[1:0] + sc[1:0] + h_in) is 0 or 4, and its carry is the
//     hidden bit h_out (registered) that the next PE receives with its first
//     word. The low two bits themselves are dropped.
//   * Last (top) word: the two carry-save halves are added into one binary
//     signed word, so the sign of the result is known; the carry out of the
//     top word is discarded (the value fits, four guard bits above N). In the
//     cycle after the top word the shifted top word is emitted, sign
//     extended by two bits, with a zero carry half.
// The outputs are combinational and go straight to the next PE. The two
// LSBs of every output word come from the registers (bits 3:2 of the
// previous word), so the next PE's LSB section sees them early in the cycle;
// only the upper bits depend on this cycle's adders.
// Timing: word i enters at cycle t+i and leaves in cycle t+i+1; the top word
// leaves in cycle t+E. A new iteration may not enter before then.
// The word-wise shift follows the published algorithm. Resolving the top word
// with an adder (instead of taking the sign from a carry) and the exact role
// of the hidden bit are this design's choices.
module shift_align #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [W-1:0] ss_new,
  input  logic [W-1:0] sc_new,
  input  logic         h_in,
  output logic [W-1:0] ss_o,
  output logic [W-1:0] sc_o,
  output logic         h_out,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last
);
  logic [W-1:0] prev_ss, cur_ss, cur_sc, top_sum;
  logic [W-1:2] prev_sc;
  logic         prev_first, pend_top, h_q;
  logic [2:0]   low_sum;

  always_comb begin
    top_sum = ss_new + sc_new;
    cur_ss  = in_last ? top_sum : ss_new;
    cur_sc  = in_last ? '0      : sc_new;
    low_sum = {1'b0, ss_new[1:0]} + {1'b0, sc_new[1:0]} + {2'b0, h_in};
  end

  always_comb begin
    out_valid = (in_valid && !in_first) || pend_top;
    out_first = in_valid && !in_first && prev_first;
    out_last  = pend_top;
    if (pend_top) begin
      ss_o = {{2{prev_ss[W-1]}}, prev_ss[W-1:2]};
      sc_o = '0;
    end else begin
      ss_o = {cur_ss[1:0], prev_ss[W-1:2]};
      sc_o = {cur_sc[1:0], prev_sc};
    end
  end

  assign h_out = h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_ss <= '0; prev_sc <= '0; prev_first <= 1'b0; pend_top <= 1'b0; h_q <= 1'b0;
    end else begin
      prev_first <= in_valid && in_first;
      pend_top   <= in_valid && in_last;
      if (in_valid) begin
        prev_ss <= cur_ss;
        prev_sc <= cur_sc[W-1:2];
        if (in_first) h_q <= low_sum[2];
      end
    end
  end

`ifndef SYNTHESIS
  // A new iteration must not start while the top word is still to be emitted.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) pend_top |-> !in_valid);
  // The first word's low bits are always a multiple of four (0 or 4).
  a_low_zero: assert property (@(posedge clk) disable iff (!rst_n)
                               (in_valid && in_first) |-> (low_sum[1:0] == 2'b00));
`endif
endmodule
