// W-bit carry-save adder (row of full adders, 3:2 compressor).
//
// sum + carry = a + b + c + cin - cout*2^W. The carry vector is already
// aligned: bit 0 holds cin and bit i holds the carry out of bit i-1; the carry
// out of bit W-1 leaves as cout and enters the next word (the next cycle) as
// its cin. Purely combinational.
// A plain full-adder row; the published PE uses three such adders.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic         cout
);
  logic [W-1:0] maj;
  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], cin};
    cout  = maj[W-1];
  end
endmodule
