// tb_nhpe -- exhaustive self-checking test of the NHPE.
//
// Every pair of 5-bit sign-magnitude LLRs (c, d), both partial-sum values
// and both modes are applied. The expected result is computed with plain
// integers: f = sign(c)sign(d)min(|c|,|d|), g = c + (-1)^usum d clipped to
// +/-15, zero always positive. The two worked examples of the NHPE
// (c = +3, d = -5 gives -2 when adding and +8 when subtracting) are also
// checked on their own.
module tb_nhpe;
  import polar_pkg::*;

  llr_t     c, d, llr;
  logic     usum;
  pe_mode_e mode;
  int       checks = 0, failures = 0;

  nhpe dut (.c(c), .d(d), .usum(usum), .mode(mode), .llr(llr));

  function automatic int to_int(llr_t l);
    return l.sign ? -int'(l.mag) : int'(l.mag);
  endfunction

  function automatic int ref_pe(int ci, int di, bit u, bit g);
    int r;
    if (!g) begin
      r = (ci < 0 ? -ci : ci) < (di < 0 ? -di : di) ? (ci < 0 ? -ci : ci) : (di < 0 ? -di : di);
      if ((ci < 0) != (di < 0)) r = -r;
    end else begin
      r = u ? ci - di : ci + di;
      if (r > 15) r = 15;
      if (r < -15) r = -15;
    end
    return r;
  endfunction

  task automatic check(int exp, string what);
    checks++;
    if (to_int(llr) != exp || (llr.mag == 0 && llr.sign)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s c=%0d d=%0d usum=%0d mode=%s got=%0d (s%0d m%0d) exp=%0d",
                 what, to_int(c), to_int(d), usum, mode.name(), to_int(llr), llr.sign, llr.mag, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked examples
    c = '{sign: 1'b0, mag: 4'd3};
    d = '{sign: 1'b1, mag: 4'd5};
    mode = PE_G;
    usum = 1'b0; #1 check(-2, "example add");
    usum = 1'b1; #1 check(8, "example sub");

    for (int m = 0; m < 2; m++)
      for (int u = 0; u < 2; u++)
        for (int a = 0; a < 32; a++)
          for (int b = 0; b < 32; b++) begin
            c = llr_t'(a);
            d = llr_t'(b);
            usum = u[0];
            mode = m ? PE_G : PE_F;
            #1 check(ref_pe(to_int(c), to_int(d), u[0], m[0]), "sweep");
          end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
