// Carry-save to binary converter of the two least significant bits.
//
// Adds the low two bits of the sum and carry vectors of S + qa*B and the
// hidden bit left over from the previous iteration, modulo 4. The result sp
// is the value the Montgomery recoder needs; the datapath itself keeps the
// carry-save form. Combinational.
// The block and its signals follow the published PE; its exact function is
// derived from what the recoder needs.
module cs_converter (
  input  logic [1:0] sum_lo,
  input  logic [1:0] carry_lo,
  input  logic       hidden,
  output logic [1:0] sp
);
  assign sp = sum_lo + carry_lo + {1'b0, hidden};
endmodule
