// Montgomery (quotient) recoder for radix 4.
//
// From the two least significant bits sp of SP = S + qa*B and bit 1 of the
// odd modulus M it picks qm in {-1,0,+1,+2} such that SP + qm*M is divisible
// by 4 (3 = -1 mod 4 removes the 3M multiple). Table:
//   sp=00 -> 0, sp=10 -> +2, sp=01 -> -1 (m1=0) / +1 (m1=1),
//   sp=11 -> +1 (m1=0) / -1 (m1=1).
// The digit is decided on the first word of an iteration (capture=1) and must
// stay constant for the remaining words, so the control word is registered
// and the held value is used while capture is low. SEL follows the same
// freeze rule as the Booth recoder: while qm=0 the SEL register keeps its
// value (+1M -> SEL=0, +2M -> SEL=1, -1M -> SEL=1 so that SEL xor NEG means
// "double"). Output is combinational in the capture cycle.
// The table follows the published scheme; the hold register for the digit
// and the SEL code values are this design's choice.
module montgomery_recoder
  import mwr4mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture,
  input  logic [1:0] sp,
  input  logic       m1,
  output mult_ctrl_t ctrl
);
  mult_ctrl_t ctrl_q, code;

  always_comb begin
    code = '0;
    code.sel = ctrl_q.sel;
    unique case ({sp, m1})
      3'b000, 3'b001: begin code.en = 1'b0; code.neg = 1'b0; end            // 0
      3'b010, 3'b111: begin code.en = 1'b1; code.neg = 1'b1; code.sel = 1'b1; end // -M
      3'b011, 3'b110: begin code.en = 1'b1; code.neg = 1'b0; code.sel = 1'b0; end // +M
      3'b100, 3'b101: begin code.en = 1'b1; code.neg = 1'b0; code.sel = 1'b1; end // +2M
      default:        begin code.en = 1'b0; code.neg = 1'b0; end
    endcase
  end

  assign ctrl = capture ? code : ctrl_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ctrl_q <= '0;
    else        ctrl_q <= ctrl;
endmodule
