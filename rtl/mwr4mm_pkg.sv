// Shared types of the scalable radix-4 Montgomery multiplier.
//
// mult_ctrl_t is the three-wire control word that both recoders hand to a
// multiple generator: EN enables the multiple (0 gives a zero word), NEG
// selects the negative multiple (one's complement of the word plus a carry-in
// of one at the least significant word) and SEL picks between the single and
// the double multiple. The SEL coding of the Booth recoder is chosen so that
// the code of +B is the inverse of that of +2B and the code of -B is the
// inverse of that of -2B; the generator therefore doubles when SEL xor NEG is
// set. The Montgomery recoder uses the same coding (its only double multiple
// is +2M, SEL=1, NEG=0).
package mwr4mm_pkg;

  typedef struct packed {
    logic neg;
    logic en;
    logic sel;
  } mult_ctrl_t;

  // Multiple selected by a control word: 0, +-1 or +-2.
  function automatic int ctrl_value(mult_ctrl_t c);
    int mag;
    if (!c.en) return 0;
    mag = (c.sel ^ c.neg) ? 2 : 1;
    return c.neg ? -mag : mag;
  endfunction

  // Number of W-bit words that hold an N-bit operand plus the guard bits that
  // the signed, carry-save partial result needs (|S + PP + PM| < 2^(N+2)).
  function automatic int unsigned num_words(int unsigned n, int unsigned w);
    return (n + 4 + w - 1) / w;
  endfunction

  // Operand selected by the load port of the register file.
  typedef enum logic [1:0] {
    OP_A = 2'd0,
    OP_B = 2'd1,
    OP_M = 2'd2
  } operand_e;

endpackage
