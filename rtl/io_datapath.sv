// IO datapath: word-serial carry-save to binary conversion of the result.
//
// The kernel leaves the result as S = SS + SC + h (h: hidden bit, weight 1).
// Words are presented least significant first (valid, first); each cycle the
// converter adds ss + sc + carry, where the carry is h on the first word and
// the carry out of the previous word afterwards, and presents the binary word
// res combinationally. The carry out of the top word is dropped: the result
// is a two's-complement number of E*W bits.
// The IO block is left application-specific by the published design; this
// converter is this design's choice.
module io_datapath #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         first,
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic         h,
  output logic [W-1:0] res
);
  logic       c_q, cin;
  logic [W:0] s;

  assign cin = first ? h : c_q;
  assign s   = {1'b0, ss} + {1'b0, sc} + {{W{1'b0}}, cin};
  assign res = s[W-1:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     c_q <= 1'b0;
    else if (valid) c_q <= s[W];
endmodule
