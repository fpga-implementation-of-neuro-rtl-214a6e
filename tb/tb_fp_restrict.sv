// tb_fp_restrict: self-checking test of the restriction (clamp) block.
// Random values against the limit pairs used by the trainer ([-1, 1],
// [-2.5, 2.5], [0.1, 2], [-100, 100]); the expected result and the `clipped`
// flag are computed on real numbers.
module tb_fp_restrict;
  import tb_fp_pkg::*;

  logic [31:0] v, lo, hi, r;
  logic        clipped;
  int          checks = 0, failures = 0;
  real         los [4] = '{-1.0, -2.5, 0.1, -100.0};
  real         his [4] = '{ 1.0,  2.5, 2.0,  100.0};

  fp_restrict dut (.value(v), .lo(lo), .hi(hi), .result(r), .clipped(clipped));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real rv, rl, rh, e;
      int  k;
      k  = n % 4;
      rl = los[k];
      rh = his[k];
      rv = (n % 50 == 0) ? rh : rand_real(-3.0 * rh, 3.0 * rh);
      v  = to_fp(rv);  lo = to_fp(rl);  hi = to_fp(rh);
      rv = to_real(v); rl = to_real(lo); rh = to_real(hi);
      e  = rv > rh ? rh : (rv < rl ? rl : rv);
      #1;
      checks += 2;
      if (to_real(r) != e) begin
        failures++;
        if (failures < 10) $display("FAIL v=%f got=%f exp=%f", rv, to_real(r), e);
      end
      if (clipped != (e != rv)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
