// polar_sc_decoder -- successive cancellation polar decoder built from NHPEs.
//
// Decodes one polar code word of length N = 2^n (default 1024, 5-bit LLRs)
// in N-1 clock cycles. The decoder is a tree (the document's main design):
// stage s (s = 1 .. n-1) is an sc_stage of N/2^s NHPEs with an llr_mem of
// its outputs, and stage n is the two-bit leaf_decoder. The psg keeps the
// partial sums for the g operations, and the sc_controller sequences the
// stages so that every cycle either runs one stage in f mode or decides two
// bits at the leaf; a pending g at the stage above is chained into that same
// cycle by forwarding its combinational output (see sc_controller).
//
// Code convention (eq. (1)): x = u * F^(x)n * B_N, so the channel LLR of
// code bit i belongs to position bitrev(i) of u * F^(x)n. The input
// permutation is fixed wiring at the channel LLR memory; the tree itself
// then works in natural order. Hard decisions follow eq. (5); frozen bits
// decode to 0. Interface and reset behaviour are this design's choices.
//
// Interface: with the decoder idle (busy low), a start pulse captures
// llr_in (sign-magnitude, index = code bit) and frozen (1 marks a frozen
// position of u, index = bit of u). busy is then high for N-1 cycles; done
// pulses for one cycle afterwards, when u_hat holds the decoded word, and
// u_hat stays until the next start. Synchronous active-low reset.
module polar_sc_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  llr_t [N-1:0] llr_in,
  input  logic [N-1:0] frozen,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] u_hat
);

  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned JW    = LOG_N - 1;
  localparam int unsigned CW    = $clog2(N + 1);

  logic          load, g_en, leaf_en;
  logic [CW-1:0] cur;
  logic [JW-1:0] j;
  logic [N-3:0]  ps;
  logic [N-1:0]  frozen_q;

  sc_controller #(.N(N)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .load      (load),
    .busy      (busy),
    .cur_stage (cur),
    .g_en      (g_en),
    .leaf_en   (leaf_en),
    .leaf_idx  (j),
    .done      (done)
  );

  // ---- channel LLR memory, input bit reversal (B_N) -----------------------
  llr_t [N-1:0] ch_wdata, ch_q;

  for (genvar k = 0; k < N; k++) begin : g_brev
    assign ch_wdata[k] = llr_in[bit_reverse(k, LOG_N)];
  end

  llr_mem #(.P(N)) u_ch_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (load),
    .wdata (ch_wdata),
    .rdata (ch_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      frozen_q <= '0;
    else if (load)
      frozen_q <= frozen;
  end

  // ---- PE stages 1 .. n-1 ----------------------------------------------
  for (genvar s = 1; s < LOG_N; s++) begin : g_st
    localparam int unsigned P   = N >> s;
    localparam int unsigned OFF = N - 2 * P;

    llr_t [2*P-1:0] node;
    llr_t [P-1:0]   child, mem_q;
    pe_mode_e       mode;
    logic           we;

    if (s == 1) begin : g_in_ch
      assign node = ch_q;
    end else begin : g_in_st
      // forward the stage above when it runs g in this cycle
      assign node = (g_en && cur == CW'(s)) ? g_st[s-1].child : g_st[s-1].mem_q;
    end

    assign mode = (g_en && cur == CW'(s + 1)) ? PE_G : PE_F;
    assign we   = busy && ((cur == CW'(s)) || (g_en && cur == CW'(s + 1)));

    sc_stage #(.P(P)) u_stage (
      .node  (node),
      .usum  (ps[OFF +: P]),
      .mode  (mode),
      .child (child)
    );

    llr_mem #(.P(P)) u_mem (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (we),
      .wdata (child),
      .rdata (mem_q)
    );
  end

  // ---- leaf (stage n) ----------------------------------------------------
  llr_t [1:0] leaf_in;
  logic       u0, u1;

  assign leaf_in = g_en ? g_st[LOG_N-1].child : g_st[LOG_N-1].mem_q;

  leaf_decoder u_leaf (
    .l0      (leaf_in[0]),
    .l1      (leaf_in[1]),
    .frozen0 (frozen_q[{j, 1'b0}]),
    .frozen1 (frozen_q[{j, 1'b1}]),
    .u0      (u0),
    .u1      (u1)
  );

  psg #(.N(N)) u_psg (
    .clk    (clk),
    .rst_n  (rst_n),
    .update (leaf_en),
    .j      (j),
    .u0     (u0),
    .u1     (u1),
    .ps     (ps)
  );

  // ---- decoded word --------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n)
      u_hat <= '0;
    else if (load)
      u_hat <= '0;
    else if (leaf_en) begin
      u_hat[{j, 1'b0}] <= u0;
      u_hat[{j, 1'b1}] <= u1;
    end
  end

endmodule
