// polar_frame_checker -- frame generator and checker for the SC polar decoder.
//
// Drives a polar_sc_decoder of length N through FRAMES frames and checks
// each one. Frames are built as on a real link: a rate-1/2 frozen set is
// chosen by the Bhattacharyya bound (design value z = 0.5, the N/2 least
// reliable positions frozen); random information bits are encoded as
// x = u F^(x)n B_N; the code bits are BPSK-mapped with amplitude 6,
// disturbed by Gaussian noise (Box-Muller) and quantized to 5-bit
// sign-magnitude LLRs saturated at +/-15. The first quarter of the frames is
// noise-free and must return u exactly; the noise then grows frame by frame.
// Every frame must match, bit for bit, a behavioural SC decoder in this file
// with the same quantized f/g arithmetic (an iterative bit-by-bit model with
// per-level LLR and partial-sum arrays), and busy must last N-1 cycles.
//
// The tap_* inputs are one-cycle event flags from inside the decoder; the
// checker counts them and, at the end, counts a failure for every mechanism
// that never happened. finished rises when all frames are done; checks and
// failures are then final.
module polar_frame_checker
  import polar_pkg::*;
#(
  parameter int N      = 64,
  parameter int FRAMES = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         start,
  output llr_t [N-1:0] llr_in,
  output logic [N-1:0] frozen,
  input  logic         busy,
  input  logic         done,
  input  logic [N-1:0] u_hat,
  input  logic         tap_f_only,
  input  logic         tap_g_to_f,
  input  logic         tap_g_to_leaf,
  input  logic         tap_g_flip,
  input  logic         tap_frozen_forced,
  input  logic         tap_info_one,
  output logic         finished,
  output int           checks,
  output int           failures
);

  localparam int LOG_N = $clog2(N);

  // ---- reference arithmetic ---------------------------------------------
  function automatic int sat(int v);
    return v > 15 ? 15 : (v < -15 ? -15 : v);
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int kf(int a, int b);
    int m;
    m = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int to_int(llr_t l);
    return l.sign ? -int'(l.mag) : int'(l.mag);
  endfunction

  function automatic int brev(int v);
    int r;
    r = 0;
    for (int b = 0; b < LOG_N; b++) if (v[b]) r |= 1 << (LOG_N - 1 - b);
    return r;
  endfunction

  // behavioural SC decoder on the channel LLRs (index = code bit)
  int alpha[LOG_N+1][N];
  bit betaL[LOG_N+1][N];
  bit beta[LOG_N+1][N];

  function automatic logic [N-1:0] ref_decode(int ch[N], logic [N-1:0] fz);
    logic [N-1:0] u;
    for (int k = 0; k < N; k++) alpha[LOG_N][k] = ch[brev(k)];
    for (int i = 0; i < N; i++) begin
      int t;
      if (i == 0) begin
        t = LOG_N;
      end else begin
        t = 0;
        while (!i[t]) t++;
        for (int k = 0; k < (1 << t); k++) begin
          int a, b;
          a = alpha[t+1][k];
          b = alpha[t+1][k+(1<<t)];
          alpha[t][k] = sat(betaL[t][k] ? b - a : b + a);
        end
      end
      for (int l = t - 1; l >= 0; l--)
        for (int k = 0; k < (1 << l); k++)
          alpha[l][k] = kf(alpha[l+1][k], alpha[l+1][k+(1<<l)]);
      u[i] = !fz[i] && alpha[0][0] < 0;
      beta[0][0] = u[i];
      for (int l = 0; l < LOG_N; l++) begin
        if (!i[l]) begin
          for (int k = 0; k < (1 << l); k++) betaL[l][k] = beta[l][k];
          break;
        end
        for (int k = 0; k < (1 << l); k++) begin
          beta[l+1][k] = betaL[l][k] ^ beta[l][k];
          beta[l+1][k+(1<<l)] = beta[l][k];
        end
      end
    end
    return u;
  endfunction

  // x = u F^(x)n by butterflies, then B_N
  function automatic logic [N-1:0] encode(logic [N-1:0] u);
    logic [N-1:0] v, x;
    v = u;
    for (int h = 1; h < N; h *= 2)
      for (int b = 0; b < N; b += 2 * h)
        for (int i = b; i < b + h; i++)
          v[i] ^= v[i+h];
    for (int i = 0; i < N; i++) x[i] = v[brev(i)];
    return x;
  endfunction

  function automatic logic [N-1:0] build_frozen();
    real z[N];
    logic [N-1:0] fz;
    for (int i = 0; i < N; i++) begin
      z[i] = 0.5;
      for (int b = LOG_N - 1; b >= 0; b--)
        z[i] = i[b] ? z[i] * z[i] : 2.0 * z[i] - z[i] * z[i];
    end
    // frozen: the N/2 largest Bhattacharyya values (ties by index)
    for (int i = 0; i < N; i++) begin
      int worse;
      worse = 0;
      for (int k = 0; k < N; k++)
        if (z[k] > z[i] || (z[k] == z[i] && k < i)) worse++;
      fz[i] = worse < N / 2;
    end
    return fz;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // ---- mechanism counters -------------------------------------------------
  int n_f_only = 0, n_g_to_f = 0, n_g_to_leaf = 0, n_g_flip = 0, n_frozen_forced = 0, n_info_one = 0;

  always @(posedge clk) begin
    if (rst_n && busy) begin
      n_f_only        += int'(tap_f_only);
      n_g_to_f        += int'(tap_g_to_f);
      n_g_to_leaf     += int'(tap_g_to_leaf);
      n_g_flip        += int'(tap_g_flip);
      n_frozen_forced += int'(tap_frozen_forced);
      n_info_one      += int'(tap_info_one);
    end
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    logic [N-1:0] u, x, u_ref, fz;
    int           ch[N];
    int           busy_cycles, frame_errors;
    real          amp, sigma;

    checks = 0;
    failures = 0;
    finished = 1'b0;
    start = 1'b0;
    fz = build_frozen();
    frozen = fz;
    llr_in = '0;
    frame_errors = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    @(posedge clk);

    for (int fr = 0; fr < FRAMES; fr++) begin
      u = '0;
      for (int i = 0; i < N; i++) if (!fz[i]) u[i] = 1'($urandom_range(0, 1));
      x = encode(u);
      amp   = 6.0;
      sigma = (fr < FRAMES / 4) ? 0.0 : 1.5 + 4.0 * real'(fr) / real'(FRAMES);
      for (int i = 0; i < N; i++) begin
        real y;
        int  q;
        y = (x[i] ? -amp : amp) + sigma * gauss();
        q = sat(int'(y));
        ch[i] = q;
        llr_in[i] = '{sign: q < 0, mag: MAG_W'(iabs(q))};
      end
      u_ref = ref_decode(ch, fz);

      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      busy_cycles = 0;
      @(negedge clk);
      while (!done) begin
        if (busy) busy_cycles++;
        @(negedge clk);
      end
      expect_true(busy_cycles == N - 1, $sformatf("frame %0d latency %0d, expected %0d", fr, busy_cycles, N - 1));
      expect_true(u_hat == u_ref, $sformatf("frame %0d differs from the reference decoder", fr));
      if (sigma == 0.0) expect_true(u_hat == u, $sformatf("frame %0d noise-free decode wrong", fr));
      if (u_ref != u) frame_errors++;
      @(posedge clk);
    end

    $display("N=%0d frames=%0d frames_with_bit_errors=%0d", N, FRAMES, frame_errors);
    $display("N=%0d mechanisms: f_steps=%0d g_into_f=%0d g_into_leaf=%0d g_with_flip=%0d frozen_forced=%0d info_ones=%0d",
             N, n_f_only, n_g_to_f, n_g_to_leaf, n_g_flip, n_frozen_forced, n_info_one);
    expect_true(n_f_only > 0, "no plain f step");
    expect_true(N == 4 || n_g_to_f > 0, "no g chained into f");
    expect_true(n_g_to_leaf > 0, "no g chained into the leaf");
    expect_true(n_g_flip > 0, "no g with partial sum 1");
    expect_true(n_frozen_forced > 0, "no frozen bit forced against its LLR");
    expect_true(n_info_one > 0, "no decoded 1");
    finished = 1'b1;
  end
endmodule
