// Glitch blocker: a level-sensitive latch that is transparent while the clock
// is low and holds while it is high.
//
// All registers of the multiplier capture on the rising clock edge. A recoder
// output that settles before the falling edge passes the latch once, at the
// falling edge, so the hazards of the combinational recoder never reach the
// W-bit wide fan-out of the multiple generators, and the PP and PM controls
// arrive at the carry-save adders at the same moment. The value seen by the
// rising-edge registers is the one present during the low phase, so in a
// zero-delay simulation the latch is functionally transparent.
// The latch is intentional; it is the power-saving element of this design.
// Placement and clock phase of the latch follow the published low-power
// scheme.
module glitch_blocker #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch
    if (!clk) q = d;
endmodule
