// tb_psg -- self-checking test of the partial sum generator (N = 16).
//
// Random decided bit pairs are fed for leaves j = 0 .. N/2-1 of several
// frames. After each leaf, the stage whose left child the leaf has just
// completed must hold the polar encoding (x = u F^(x)n, by the butterfly
// x[i] ^= x[i+len]) of that child's bits; the registers of all other stages
// must keep their contents.
module tb_psg;

  localparam int N     = 16;
  localparam int LOG_N = 4;

  logic                 clk = 1'b0, rst_n = 1'b0, update = 1'b0, u0, u1;
  logic [LOG_N-2:0]     j;
  logic [N-3:0]         ps, ps_exp;
  logic [N-1:0]         u;
  int                   checks = 0, failures = 0;

  psg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .update(update), .j(j), .u0(u0), .u1(u1), .ps(ps));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] encode(logic [N-1:0] v, int len);
    for (int h = 1; h < len; h *= 2)
      for (int b = 0; b < len; b += 2 * h)
        for (int i = b; i < b + h; i++)
          v[i] ^= v[i+h];
    return v;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    j = '0; u0 = 1'b0; u1 = 1'b0;
    ps_exp = '0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (ps !== '0) begin failures++; $display("FAIL reset"); end
    for (int frame = 0; frame < 20; frame++) begin
      u = N'({$urandom, $urandom});
      for (int jj = 0; jj < N / 2; jj++) begin
        int q, size, base, s, off;
        logic [N-1:0] sub;
        j = (LOG_N - 1)'(jj);
        u0 = u[2*jj];
        u1 = u[2*jj+1];
        update = 1'b1;
        // trailing ones of jj -> completed node of 2^(q+1) bits
        q = 0;
        while (q < LOG_N - 1 && jj[q]) q++;
        if (q < LOG_N - 1) begin
          size = 2 ** (q + 1);
          base = 2 * jj + 2 - size;
          sub  = '0;
          for (int k = 0; k < size; k++) sub[k] = u[base+k];
          sub  = encode(sub, size);
          s    = LOG_N - 1 - q;
          off  = N - 2 ** (LOG_N - s + 1);
          for (int k = 0; k < size; k++) ps_exp[off+k] = sub[k];
        end
        @(posedge clk);
        @(negedge clk);
        update = 1'b0;
        checks++;
        if (ps !== ps_exp) begin
          failures++;
          if (failures < 10) $display("FAIL frame=%0d j=%0d ps=%b exp=%b", frame, jj, ps, ps_exp);
        end
        // idle cycle: nothing may change
        @(posedge clk);
        @(negedge clk);
        checks++;
        if (ps !== ps_exp) begin
          failures++;
          if (failures < 10) $display("FAIL hold frame=%0d j=%0d", frame, jj);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
