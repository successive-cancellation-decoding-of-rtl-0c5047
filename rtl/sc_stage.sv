// sc_stage -- one stage of the SC decoding tree: P NHPEs side by side.
//
// The stage takes the 2P LLRs of the current tree node, pairs LLR i of the
// upper half with LLR i of the lower half, and runs all P NHPEs in the same
// mode: in f mode the outputs are the LLRs of the left child node, in g
// mode (with the P partial sums of the already decided left child) those of
// the right child. This follows the document's tree decoder, where all PEs
// of one stage act as f nodes or as g nodes in a given cycle.
//
// Interface: combinational. node[P-1:0] is the upper half, node[2P-1:P] the
// lower half; usum[i] is the partial sum for pair i.
module sc_stage
  import polar_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  llr_t [2*P-1:0] node,
  input  logic [P-1:0]   usum,
  input  pe_mode_e       mode,
  output llr_t [P-1:0]   child
);

  for (genvar i = 0; i < P; i++) begin : g_pe
    // g(a, b, v) = b + (-1)^v a: the upper-half LLR is the NHPE's d operand
    nhpe u_pe (
      .c    (node[P+i]),
      .d    (node[i]),
      .usum (usum[i]),
      .mode (mode),
      .llr  (child[i])
    );
  end

endmodule
