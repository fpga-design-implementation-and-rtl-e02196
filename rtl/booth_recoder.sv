// Radix-4 modified Booth recoder.
//
// Maps the multiplier bit triple (a[j+1], a[j], a[j-1]) to the recoded digit
// qa in {-2,-1,0,+1,+2} of the classic Booth table, delivered as the control
// word NEG/EN/SEL of mwr4mm_pkg::mult_ctrl_t. Two power-saving measures are
// built in:
//   * SEL coding: +B -> SEL=0, +2B -> SEL=1, -B -> SEL=1, -2B -> SEL=0, i.e.
//     the code of +B is the inverse of +2B and that of -B the inverse of -2B.
//   * SEL freeze: when the digit is zero (EN=0) the generated word does not
//     depend on SEL, so SEL keeps its previous value from a one-bit register
//     in a feedback loop instead of toggling.
// NEG is forced to 0 for a zero digit so that no carry-in is injected.
// The recoding table, the inverse SEL codes and the SEL freeze follow the
// published architecture; the concrete code values are this design's choice.
// Interface: the triple is held for a whole iteration by the PE; ctrl is
// combinational from trip and the SEL register, which updates every cycle.
module booth_recoder
  import mwr4mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] trip,
  output mult_ctrl_t ctrl
);
  logic sel_q;
  logic sel_code;

  always_comb begin
    ctrl = '0;
    sel_code = sel_q;
    unique case (trip)
      3'b000, 3'b111: begin ctrl.en = 1'b0; ctrl.neg = 1'b0; sel_code = sel_q; end // 0
      3'b001, 3'b010: begin ctrl.en = 1'b1; ctrl.neg = 1'b0; sel_code = 1'b0;  end // +1
      3'b011:         begin ctrl.en = 1'b1; ctrl.neg = 1'b0; sel_code = 1'b1;  end // +2
      3'b100:         begin ctrl.en = 1'b1; ctrl.neg = 1'b1; sel_code = 1'b0;  end // -2
      3'b101, 3'b110: begin ctrl.en = 1'b1; ctrl.neg = 1'b1; sel_code = 1'b1;  end // -1
      default:        begin ctrl.en = 1'b0; ctrl.neg = 1'b0; sel_code = sel_q; end
    endcase
    ctrl.sel = sel_code;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel_q <= 1'b0;
    else        sel_q <= sel_code;
endmodule
