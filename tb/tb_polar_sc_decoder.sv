// tb_polar_sc_decoder -- end-to-end test of the SC polar decoder (N = 64).
//
// 40 frames from polar_frame_checker: noise-free frames must decode to the
// sent u, every frame must match the behavioural SC model bit for bit, busy
// must last N-1 cycles, and each mechanism must occur: plain f steps, a g
// chained into an f step, a g chained into the leaf, a g with a partial sum
// of 1 (sign-flipped operand), a frozen bit forced to 0 against its LLR,
// and a decoded 1. The event taps are read from inside the decoder.
module tb_polar_sc_decoder;
  import polar_pkg::*;

  localparam int N = 64;

  logic         clk = 1'b0, rst_n = 1'b0, start, busy, done, finished;
  llr_t [N-1:0] llr_in;
  logic [N-1:0] frozen, u_hat;
  int           checks, failures;

  always #5 clk = ~clk;

  polar_sc_decoder #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .llr_in(llr_in), .frozen(frozen),
    .busy(busy), .done(done), .u_hat(u_hat)
  );

  polar_frame_checker #(.N(N), .FRAMES(40)) chk (
    .clk(clk), .rst_n(rst_n), .start(start), .llr_in(llr_in), .frozen(frozen),
    .busy(busy), .done(done), .u_hat(u_hat),
    .tap_f_only        (!dut.g_en && !dut.leaf_en),
    .tap_g_to_f        (dut.g_en && !dut.leaf_en),
    .tap_g_to_leaf     (dut.g_en && dut.leaf_en),
    .tap_g_flip        (dut.g_en && dut.ps != '0),
    .tap_frozen_forced (dut.leaf_en && ((dut.u_leaf.frozen0 && hard_decision(dut.u_leaf.llr_u0, 1'b0)) ||
                                        (dut.u_leaf.frozen1 && hard_decision(dut.u_leaf.llr_u1, 1'b0)))),
    .tap_info_one      (dut.leaf_en && (dut.u0 || dut.u1)),
    .finished(finished), .checks(checks), .failures(failures)
  );

  initial begin
    repeat (40 * (N + 20) + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
