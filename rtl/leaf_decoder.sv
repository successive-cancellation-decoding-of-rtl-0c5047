// leaf_decoder -- last-stage two-bit decision unit of the SC decoder.
//
// The last stage of the tree receives the two LLRs (l0, l1) of a length-2
// sub-code and decides both of its bits in the same cycle: the f kernel
// gives the LLR of the first bit, whose hard decision (eq. (5)) is at once
// the partial sum of the g kernel that gives the LLR of the second bit.
// Deciding two bits per cycle in the last stage follows the document's
// schedule; using one f-mode and one g-mode NHPE (rather than one PE with
// both kernels brought out) is this design's choice and costs the same
// hardware once synthesis drops each instance's unused kernel.
//
// Operand mapping: the NHPE computes c + (-1)^usum * d, so the LLR whose
// sign depends on the earlier bit (l0, the upper half) goes to d.
//
// Interface: combinational. frozen0/frozen1 force the matching bit to 0.
module leaf_decoder
  import polar_pkg::*;
(
  input  llr_t l0,
  input  llr_t l1,
  input  logic frozen0,
  input  logic frozen1,
  output logic u0,
  output logic u1
);

  llr_t llr_u0, llr_u1;

  nhpe u_pe_f (
    .c    (l1),
    .d    (l0),
    .usum (1'b0),
    .mode (PE_F),
    .llr  (llr_u0)
  );

  assign u0 = hard_decision(llr_u0, frozen0);

  nhpe u_pe_g (
    .c    (l1),
    .d    (l0),
    .usum (u0),
    .mode (PE_G),
    .llr  (llr_u1)
  );

  assign u1 = hard_decision(llr_u1, frozen1);

endmodule
