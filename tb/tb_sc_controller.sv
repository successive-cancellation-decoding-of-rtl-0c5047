// tb_sc_controller -- self-checking test of the decoding schedule.
//
// N = 8: the step sequence is compared cycle by cycle with the hand-built
// seven-cycle schedule (stage of the f or leaf step, whether a g is chained
// in, leaf index):
//   1: S1 f   2: S2 f   3: leaf 0   4: S2 g + leaf 1
//   5: S1 g + S2 f   6: leaf 2   7: S2 g + leaf 3
// N = 1024: busy must last exactly N-1 = 1023 cycles, with N/2-1 f steps,
// N/2-1 chained g steps and N/2 leaf steps in increasing leaf order, and
// done must pulse once, in the cycle after the last leaf step. Both decoders
// are run twice back to back, and a start while busy must be ignored.
module tb_sc_controller;

  logic clk = 1'b0, rst_n = 1'b0, start8 = 1'b0, start1k = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- N = 8 ----------------------------------------------------------
  logic       load8, busy8, g8, leaf8, done8;
  logic [3:0] cur8;
  logic [1:0] j8;

  sc_controller #(.N(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(start8), .load(load8), .busy(busy8),
    .cur_stage(cur8), .g_en(g8), .leaf_en(leaf8), .leaf_idx(j8), .done(done8)
  );

  // ---- N = 1024 -------------------------------------------------------
  logic       load1k, busy1k, g1k, leaf1k, done1k;
  logic [10:0] cur1k;
  logic [8:0]  j1k;

  sc_controller #(.N(1024)) dut1k (
    .clk(clk), .rst_n(rst_n), .start(start1k), .load(load1k), .busy(busy1k),
    .cur_stage(cur1k), .g_en(g1k), .leaf_en(leaf1k), .leaf_idx(j1k), .done(done1k)
  );

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected N = 8 schedule: stage, g chained, leaf index
  int exp_stage[7] = '{1, 2, 3, 3, 2, 3, 3};
  int exp_g[7]     = '{0, 0, 0, 1, 1, 0, 1};
  int exp_j[7]     = '{0, 0, 0, 1, 1, 2, 3};

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      // ---- N = 8 ----
      start8 <= 1'b1;
      @(posedge clk);
      expect_true(load8 && !busy8, "N=8 load on start");
      start8 <= 1'b0;
      for (int c = 0; c < 7; c++) begin
        @(negedge clk);
        if (c == 2) start8 <= 1'b1;  // ignored while busy
        if (c == 3) start8 <= 1'b0;
        expect_true(busy8, $sformatf("N=8 busy in cycle %0d", c + 1));
        expect_true(!load8, $sformatf("N=8 no load while busy, cycle %0d", c + 1));
        expect_true(int'(cur8) == exp_stage[c] && int'(g8) == exp_g[c] &&
                    int'(leaf8) == int'(exp_stage[c] == 3) && (exp_stage[c] != 3 || int'(j8) == exp_j[c]),
                    $sformatf("N=8 cycle %0d: stage=%0d g=%0d leaf=%0d j=%0d", c + 1, cur8, g8, leaf8, j8));
        expect_true(!done8, "N=8 no early done");
        @(posedge clk);
      end
      @(negedge clk);
      expect_true(done8 && !busy8, "N=8 done after 7 cycles");
      @(posedge clk);

      // ---- N = 1024 ----
      begin
        int busy_cycles, f_steps, g_steps, leaf_steps, next_leaf, done_seen;
        busy_cycles = 0; f_steps = 0; g_steps = 0; leaf_steps = 0; next_leaf = 0; done_seen = 0;
        start1k <= 1'b1;
        @(posedge clk);
        start1k <= 1'b0;
        @(negedge clk);
        while (busy1k) begin
          busy_cycles++;
          if (g1k) g_steps++;
          if (leaf1k) begin
            leaf_steps++;
            if (int'(j1k) != next_leaf) expect_true(0, $sformatf("N=1024 leaf order %0d", j1k));
            next_leaf++;
          end else f_steps++;
          if (done1k) done_seen++;
          @(negedge clk);
        end
        expect_true(busy_cycles == 1023, $sformatf("N=1024 latency %0d", busy_cycles));
        expect_true(f_steps == 511, $sformatf("N=1024 f steps %0d", f_steps));
        expect_true(g_steps == 511, $sformatf("N=1024 g steps %0d", g_steps));
        expect_true(leaf_steps == 512, $sformatf("N=1024 leaf steps %0d", leaf_steps));
        expect_true(done1k && done_seen == 0, "N=1024 done right after the last leaf");
        @(negedge clk);
        expect_true(!done1k, "N=1024 done is one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
