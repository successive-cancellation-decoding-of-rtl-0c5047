// tb_polar_workloads -- the decoder at every other code length evaluated for
// this architecture: N = 8, 64, 128, 256 and 512 at rate 1/2 (N = 1024 is
// covered by tb_polar_sc_decoder_full). One decoder per length is built
// with its N parameter and driven by polar_frame_checker: noise-free frames
// must decode exactly, all frames must match the behavioural SC model bit
// for bit, busy must last N-1 cycles per frame (7, 63, 127, 255, 511), and
// each mechanism (f step, g chained into f, g chained into the leaf,
// sign-flipped g, forced frozen bit, decoded 1) must occur at every length.
module tb_polar_workloads;
  import polar_pkg::*;

  localparam int NUM            = 5;
  localparam int SIZES[NUM]     = '{8, 64, 128, 256, 512};
  localparam int FRAMES_OF[NUM] = '{40, 16, 12, 12, 12};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM-1:0] finished;
  int   checks_of[NUM], failures_of[NUM];

  always #5 clk = ~clk;

  for (genvar w = 0; w < NUM; w++) begin : g_w
    localparam int N = SIZES[w];

    logic         start, busy, done;
    llr_t [N-1:0] llr_in;
    logic [N-1:0] frozen, u_hat;

    polar_sc_decoder #(.N(N)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .llr_in(llr_in), .frozen(frozen),
      .busy(busy), .done(done), .u_hat(u_hat)
    );

    polar_frame_checker #(.N(N), .FRAMES(FRAMES_OF[w])) chk (
      .clk(clk), .rst_n(rst_n), .start(start), .llr_in(llr_in), .frozen(frozen),
      .busy(busy), .done(done), .u_hat(u_hat),
      .tap_f_only        (!dut.g_en && !dut.leaf_en),
      .tap_g_to_f        (dut.g_en && !dut.leaf_en),
      .tap_g_to_leaf     (dut.g_en && dut.leaf_en),
      .tap_g_flip        (dut.g_en && dut.ps != '0),
      .tap_frozen_forced (dut.leaf_en && ((dut.u_leaf.frozen0 && hard_decision(dut.u_leaf.llr_u0, 1'b0)) ||
                                          (dut.u_leaf.frozen1 && hard_decision(dut.u_leaf.llr_u1, 1'b0)))),
      .tap_info_one      (dut.leaf_en && (dut.u0 || dut.u1)),
      .finished(finished[w]), .checks(checks_of[w]), .failures(failures_of[w])
    );
  end

  function automatic int total(int v[NUM]);
    int t;
    t = 0;
    for (int i = 0; i < NUM; i++) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (12 * (512 + 20) + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks_of), total(failures_of) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks_of), total(failures_of));
    $finish;
  end
endmodule
