// nhpe -- new hybrid processing element of the SC polar decoder.
//
// One PE computes either kernel of successive cancellation decoding:
//   f mode:  sign(c) xor sign(d), min(|c|, |d|)   (sign and magnitude apart)
//   g mode:  c + (-1)^usum * d
// The g kernel has a single adder and no subtractor: the sign bit of d is
// XORed with the partial sum usum (usum = 0 keeps d, usum = 1 negates it),
// then both sign-magnitude operands are turned into two's complement, added,
// and the sum is turned back into sign-magnitude. This unified-adder g and
// the XOR sign modification (truth table: modified sign = sign(d) xor usum)
// are the element's defining idea and follow the document. Choices of this
// design: the sum saturates to +/-MAG_MAX when it does not fit in MAG_W
// magnitude bits, and a zero result is always given a + sign.
//
// Interface: purely combinational. c, d are LLRs, usum the partial sum bit,
// mode selects which kernel drives llr. No clock, no latency.
module nhpe
  import polar_pkg::*;
(
  input  llr_t     c,
  input  llr_t     d,
  input  logic     usum,
  input  pe_mode_e mode,
  output llr_t     llr
);

  // ---- f kernel -------------------------------------------------------
  llr_t f_res;
  always_comb begin
    f_res.mag  = (c.mag < d.mag) ? c.mag : d.mag;
    f_res.sign = (c.sign ^ d.sign) && (f_res.mag != '0);
  end

  // ---- g kernel: XOR sign modification + one adder ----------------------
  localparam int unsigned MAG_MAX = (1 << MAG_W) - 1;
  localparam int unsigned SW = MAG_W + 2;  // room for the sum of two magnitudes

  logic          d_sign_mod;
  logic [SW-1:0] c_tc, d_tc, sum_tc, sum_abs;
  llr_t          g_res;

  always_comb begin
    d_sign_mod = d.sign ^ usum;
    c_tc   = c.sign     ? -SW'(c.mag) : SW'(c.mag);
    d_tc   = d_sign_mod ? -SW'(d.mag) : SW'(d.mag);
    sum_tc = c_tc + d_tc;
    sum_abs = sum_tc[SW-1] ? -sum_tc : sum_tc;
    g_res.mag  = (sum_abs > SW'(MAG_MAX)) ? MAG_W'(MAG_MAX) : sum_abs[MAG_W-1:0];
    g_res.sign = sum_tc[SW-1];
  end

  assign llr = (mode == PE_G) ? g_res : f_res;

endmodule
