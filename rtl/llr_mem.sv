// llr_mem -- LLR memory of one tree level.
//
// A bank of P LLR registers. The decoder keeps one bank per tree level: the
// channel LLRs, and the output of every stage, so that a g operation can
// later reread the LLRs its f sibling used. Written as an array of
// registers so that all P words are read and written in parallel, as the
// tree decoder needs. The document names a memory unit as one of the three
// parts of an SC decoder; its organisation here is this design's choice.
//
// Interface: on a rising clk with we = 1 all P words take wdata; rdata shows
// the stored words. An active-low synchronous reset clears them.
module llr_mem
  import polar_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  llr_t [P-1:0] wdata,
  output llr_t [P-1:0] rdata
);

  llr_t [P-1:0] mem;

  always_ff @(posedge clk) begin
    if (!rst_n)
      mem <= '0;
    else if (we)
      mem <= wdata;
  end

  assign rdata = mem;

endmodule
