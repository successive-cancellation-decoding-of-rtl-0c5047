// tb_sc_stage -- self-checking test of one tree stage (P = 8 NHPEs).
//
// Random node LLRs, partial sums and modes are applied; every child LLR is
// compared with an integer model: f(a_i, b_i) in f mode and
// b_i + (-1)^usum_i a_i (clipped to +/-15) in g mode, where a is the upper
// and b the lower half of the node.
module tb_sc_stage;
  import polar_pkg::*;

  localparam int P = 8;

  llr_t [2*P-1:0] node;
  logic [P-1:0]   usum;
  pe_mode_e       mode;
  llr_t [P-1:0]   child;
  int             checks = 0, failures = 0;

  sc_stage #(.P(P)) dut (.node(node), .usum(usum), .mode(mode), .child(child));

  function automatic int to_int(llr_t l);
    return l.sign ? -int'(l.mag) : int'(l.mag);
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 2 * P; i++) node[i] = llr_t'($urandom_range(0, 31));
      usum = P'($urandom);
      mode = (t % 2) ? PE_G : PE_F;
      #1;
      for (int i = 0; i < P; i++) begin
        int a, b, e;
        a = to_int(node[i]);
        b = to_int(node[P+i]);
        if (mode == PE_F) begin
          e = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
          if ((a < 0) != (b < 0)) e = -e;
        end else begin
          e = usum[i] ? b - a : b + a;
          if (e > 15) e = 15;
          if (e < -15) e = -15;
        end
        checks++;
        if (to_int(child[i]) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d i=%0d mode=%s a=%0d b=%0d u=%0d got=%0d exp=%0d",
                     t, i, mode.name(), a, b, usum[i], to_int(child[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
