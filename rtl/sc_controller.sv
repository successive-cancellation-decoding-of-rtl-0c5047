// sc_controller -- decoding schedule of the N-1 cycle SC decoder.
//
// The tree has stages 1 .. n-1 (n = log2 N) of NHPEs and a last stage n,
// the leaf decoder, that decides two bits per cycle. Every cycle does one
// of two things:
//   * an f step at stage cur (cur < n): the left child of the current node
//     is computed and stored;
//   * a leaf step (cur = n): bits 2j and 2j+1 are decided.
// When g_en is set, stage cur-1 additionally runs in g mode in the same
// cycle and its result is forwarded straight into stage cur (and stored).
// Chaining each g into the next step removes one cycle per tree node, which
// turns the 1.5N-2 cycles of a plain two-bit SC schedule into N-1, the
// latency the document gives for its pipelined decoder (7 cycles for N=8,
// 1023 for N=1024). The document's Table 3 lists, for N=8, the stage-1 g in
// cycle 4 beside the last-stage g; this design runs it in cycle 5 chained
// with the stage-2 f, which keeps the same cycle count with causal partial
// sums:
//   cycle 1: S1 f      cycle 2: S2 f      cycle 3: leaf u1,u2
//   cycle 4: S2 g+leaf u3,u4             cycle 5: S1 g+S2 f
//   cycle 6: leaf u5,u6                   cycle 7: S2 g+leaf u7,u8
// After leaf j, leaf j+1 starts at stage n-1-p with a g, where p is the
// number of trailing zeros of j+1.
//
// Interface: start is taken when idle and produces a one-cycle load (the
// datapath captures the channel LLRs); busy is then high for exactly N-1
// cycles, and done pulses in the cycle after the last leaf step, when the
// decoded word is complete. Synchronous active-low reset.
module sc_controller #(
  parameter int unsigned N = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   load,
  output logic                   busy,
  output logic [$clog2(N+1)-1:0] cur_stage,
  output logic                   g_en,
  output logic                   leaf_en,
  output logic [$clog2(N)-2:0]   leaf_idx,
  output logic                   done
);

  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned JW    = LOG_N - 1;
  localparam int unsigned CW    = $clog2(N + 1);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [CW-1:0] cur;
  logic          g_pend;
  logic [JW-1:0] j;
  logic [JW-1:0] j_next;
  logic          last_leaf;

  // number of trailing zeros of a nonzero leaf index
  function automatic int unsigned trailing_zeros(logic [JW-1:0] v);
    int unsigned t;
    t = 0;
    for (int unsigned b = 0; b < JW; b++) begin
      if (!v[b] && t == b) t = b + 1;
    end
    return t;
  endfunction

  assign j_next    = j + 1'b1;
  assign last_leaf = (j == '1);
  assign leaf_en   = (state == S_RUN) && (cur == CW'(LOG_N));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cur    <= CW'(1);
      g_pend <= 1'b0;
      j      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_RUN;
            cur    <= CW'(1);
            g_pend <= 1'b0;
            j      <= '0;
          end
        end
        S_RUN: begin
          if (!leaf_en) begin
            cur    <= cur + 1'b1;
            g_pend <= 1'b0;
          end else if (last_leaf) begin
            state  <= S_IDLE;
            g_pend <= 1'b0;
            done   <= 1'b1;
          end else begin
            j      <= j_next;
            cur    <= CW'(LOG_N - trailing_zeros(j_next));
            g_pend <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load      = (state == S_IDLE) && start;
  assign busy      = (state == S_RUN);
  assign cur_stage = cur;
  assign g_en      = (state == S_RUN) && g_pend;
  assign leaf_idx  = j;

  // a g step always has a stage above the one it feeds
  a_g_stage: assert property (@(posedge clk) disable iff (!rst_n)
    g_en |-> (cur >= CW'(2) && cur <= CW'(LOG_N)));
  a_cur_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (cur >= CW'(1) && cur <= CW'(LOG_N)));

  initial assert (N >= 4 && (1 << LOG_N) == N)
    else $error("sc_controller: N must be a power of two, at least 4");

endmodule
