// gf_pkg: shared types of the GF(d^m) multiplier core.
//
// The multiplier matrix can be built from three kinds of Modified Guild
// Cell (MGC), the cell that computes S = (A + B*C) mod d on one digit of a
// field element. The enum below names them; its values 1..3 are the variant
// numbers used for the three construction styles. The helper function gives
// the digit width k = ceil(log2 d) that every cell port uses.
package gf_pkg;

  typedef enum logic [1:0] {
    MGC_WHOLE  = 2'd1,  // MGC as one whole element (one truth table)
    MGC_MULADD = 2'd2,  // MGC as a MUL mod d followed by a SUM mod d
    MGC_GATES  = 2'd3   // MGC of bit cells: SMn, SMch, Sn, Rn, SUM_G
  } mgc_variant_e;

  // Bits per digit of GF(d^m): ceil(log2 d), at least 1.
  function automatic int unsigned digit_bits(input int unsigned d);
    return (d <= 2) ? 1 : $clog2(d);
  endfunction

endpackage
