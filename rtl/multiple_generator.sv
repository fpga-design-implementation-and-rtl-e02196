// Multiple generator (PP generator for qa*B, PM generator for qm*M).
//
// Produces one W-bit word of the two's-complement multiple k*X, k in
// {-2,-1,0,+1,+2}, from one word x of X. Doubling is a one-bit left shift
// across the word boundary: the previous word's MSB enters at bit 0 (0 for
// the first word). A negative multiple is the one's complement of the
// magnitude; the +1 that completes the two's complement is injected by the
// PE as carry-in of the carry-save adder on the first word. EN=0 gives zero.
// Purely combinational.
// The published design names PP and PM generators built from inversion and
// shifting; one shared module for both is this design's choice.
module multiple_generator
  import mwr4mm_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic         x_prev_msb,
  input  mult_ctrl_t   ctrl,
  output logic [W-1:0] y
);
  logic [W-1:0] mag;
  always_comb begin
    mag = (ctrl.sel ^ ctrl.neg) ? {x[W-2:0], x_prev_msb} : x;
    if (!ctrl.en)      y = '0;
    else if (ctrl.neg) y = ~mag;
    else               y = mag;
  end
endmodule
