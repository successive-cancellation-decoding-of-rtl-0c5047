// psg -- partial sum generation unit of the SC decoder.
//
// The g kernel of a stage needs, for each of its PEs, one bit of the
// re-encoded left child (eq. (7): the partial sum of previously decided
// bits). This unit keeps, for every stage s = 1 .. n-1, a register of
// 2^(n-s) partial-sum bits holding the polar encoding of the most recently
// completed left child at that stage.
//
// Each time the leaf decides bits (u0, u1) of leaf j, the encoding of the
// finished sub-codes is rebuilt combinationally upward:
//   e_0     = {u1, u0 ^ u1}
//   e_(i+1) = {e_i, ps_(n-1-i) ^ e_i}   (the kernel [v ^ w, w] of F)
// and e_q is stored in stage n-1-q, where q is the number of trailing ones
// of j: the node finished by leaf j is a left child at that stage. The
// stored bits are used by the g of that stage in the very next cycle. The
// document names the PSG and its role; this register organisation is this
// design's choice.
//
// Interface: on a rising clk with update = 1, (j, u0, u1) are taken in.
// ps holds the registers of all stages packed: stage s occupies
// ps[N - 2^(n-s+1) +: 2^(n-s)], so stage 1 is at the bottom (N/2 bits) and
// stage n-1 at the top (2 bits). Synchronous active-low reset clears them.
module psg #(
  parameter int unsigned N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 update,
  input  logic [$clog2(N)-2:0] j,
  input  logic                 u0,
  input  logic                 u1,
  output logic [N-3:0]         ps
);

  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned JW    = LOG_N - 1;

  // number of trailing ones of the leaf index
  function automatic int unsigned trailing_ones(logic [JW-1:0] v);
    int unsigned t;
    t = 0;
    for (int unsigned b = 0; b < JW; b++) begin
      if (v[b] && t == b) t = b + 1;
    end
    return t;
  endfunction

  int unsigned q;

  assign q = trailing_ones(j);

  // e_i of the header: sub-code of 2^(i+1) bits finished by this leaf
  for (genvar i = 0; i < LOG_N - 1; i++) begin : g_lvl
    localparam int unsigned W   = 2 ** (i + 1);
    localparam int unsigned OFF = N - 2 ** (i + 2);
    logic [W-1:0] enc;
    logic [W-1:0] ps_r;  // partial sums of stage n-1-i

    if (i == 0) begin : g_first
      assign enc = {u1, u0 ^ u1};
    end else begin : g_next
      assign enc = {g_lvl[i-1].enc, g_lvl[i-1].ps_r ^ g_lvl[i-1].enc};
    end

    always_ff @(posedge clk) begin
      if (!rst_n)
        ps_r <= '0;
      else if (update && q == i)
        ps_r <= enc;
    end

    assign ps[OFF +: W] = ps_r;
  end

endmodule
