// tb_leaf_decoder -- exhaustive self-checking test of the two-bit leaf.
//
// All pairs of LLRs and all four frozen patterns are applied. The expected
// bits come from integer arithmetic on the length-2 code x = (u0^u1, u1):
// u0 is the sign decision of f(l0, l1); u1 that of l1 + (-1)^u0 l0 (clipped
// to +/-15); a frozen bit is 0; an LLR of 0 decides 0.
module tb_leaf_decoder;
  import polar_pkg::*;

  llr_t l0, l1;
  logic frozen0, frozen1, u0, u1;
  int   checks = 0, failures = 0;

  leaf_decoder dut (.l0(l0), .l1(l1), .frozen0(frozen0), .frozen1(frozen1), .u0(u0), .u1(u1));

  function automatic int to_int(llr_t l);
    return l.sign ? -int'(l.mag) : int'(l.mag);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int fz = 0; fz < 4; fz++)
      for (int a = 0; a < 32; a++)
        for (int b = 0; b < 32; b++) begin
          int  x0, x1, lf, lg;
          bit  e0, e1;
          l0 = llr_t'(a);
          l1 = llr_t'(b);
          frozen0 = fz[0];
          frozen1 = fz[1];
          x0 = to_int(l0);
          x1 = to_int(l1);
          lf = ((x0 < 0 ? -x0 : x0) < (x1 < 0 ? -x1 : x1)) ? (x0 < 0 ? -x0 : x0) : (x1 < 0 ? -x1 : x1);
          if ((x0 < 0) != (x1 < 0)) lf = -lf;
          e0 = !fz[0] && lf < 0;
          lg = e0 ? x1 - x0 : x1 + x0;
          if (lg > 15) lg = 15;
          if (lg < -15) lg = -15;
          e1 = !fz[1] && lg < 0;
          #1;
          checks++;
          if (u0 !== e0 || u1 !== e1) begin
            failures++;
            if (failures < 10)
              $display("FAIL l0=%0d l1=%0d fz=%0d got %0d%0d exp %0d%0d", x0, x1, fz, u0, u1, e0, e1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
