// polar_pkg -- types and constants shared by the polar SC decoder.
//
// LLRs are carried in sign-magnitude form: one sign bit (1 = negative) and
// Q-1 magnitude bits. Q = 5 is the quantization of the decoder's main
// configuration; the sign-magnitude layout follows the worked NHPE example
// ("0 0011" = +3, "1 0101" = -5). The PE mode enum selects the f (min-sum)
// or g (partial-sum controlled add) kernel of a processing element.
package polar_pkg;

  // LLR quantization in bits, sign included.
  parameter int unsigned Q     = 5;
  parameter int unsigned MAG_W = Q - 1;

  typedef struct packed {
    logic             sign;  // 1: negative
    logic [MAG_W-1:0] mag;
  } llr_t;

  typedef enum logic {
    PE_F = 1'b0,
    PE_G = 1'b1
  } pe_mode_e;

  // Hard decision of eq. (5): 1 for a negative LLR of a free bit, 0 for a
  // frozen bit or an LLR >= 0. A zero magnitude counts as >= 0 whatever its
  // sign bit says.
  function automatic logic hard_decision(llr_t l, logic frozen);
    return !frozen && l.sign && (l.mag != '0);
  endfunction

  // Bit reversal of an index of the given width (for B_N of eq. (1)).
  function automatic int unsigned bit_reverse(int unsigned idx, int unsigned width);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < width; b++)
      if (idx[b]) r |= 1 << (width - 1 - b);
    return r;
  endfunction

endpackage
