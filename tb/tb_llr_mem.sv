// tb_llr_mem -- self-checking test of the LLR register bank (P = 6).
//
// Checks that reset clears every word, that a write with we = 1 stores all
// words at the clock edge, and that the contents hold while we = 0.
module tb_llr_mem;
  import polar_pkg::*;

  localparam int P = 6;

  logic         clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  llr_t [P-1:0] wdata, rdata, model;
  int           checks = 0, failures = 0;

  llr_mem #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (rdata !== model) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, rdata, model);
    end
  endtask

  initial begin
    wdata = '0;
    @(posedge clk);
    @(negedge clk);
    model = '0;
    check("reset");
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      we = ($urandom_range(0, 2) == 0);
      for (int i = 0; i < P; i++) wdata[i] = llr_t'($urandom_range(0, 31));
      @(posedge clk);
      if (we) model = wdata;
      @(negedge clk);
      check(we ? "write" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
