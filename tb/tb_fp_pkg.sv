// tb_fp_pkg: reference conversions between `real` and IEEE-754 single
// precision bit patterns for the testbenches. The conversions work on the
// 64-bit pattern of a real ($realtobits), independently of the design's
// arithmetic: to_fp rounds to nearest even and flushes subnormals to zero,
// like the design; to_real is exact.
package tb_fp_pkg;

  function automatic logic [31:0] to_fp(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(f[30:23]) + 11'd896;  // rebias 127 -> 1023
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  // Random real in [lo, hi).
  function automatic real rand_real(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  // 2^n for a small integer n
  function automatic real pow2(int n);
    return $bitstoreal({1'b0, 11'(1023 + n), 52'd0});
  endfunction

  function automatic real abs_r(real a);
    return a < 0.0 ? -a : a;
  endfunction

  // Double precision model of the 2-input, 4-rule network. p holds the 20
  // parameters (MF k: centre 2k, width 2k+1; rule i: p, q, r at 8+3i..10+3i).
  function automatic real nfs_model(real p [20], real vx, real vy, bit eq10);
    real mu [4], w [4], f [4], sw, z, d, s;
    for (int k = 0; k < 4; k++) begin
      d = (k < 2 ? vx : vy) - p[2*k];
      s = p[2*k+1];
      mu[k] = eq10 ? s * s / (s * s + d * d) : s / (s + abs_r(d));
    end
    sw = 0.0;
    for (int i = 0; i < 4; i++) begin
      w[i] = mu[i / 2] * mu[2 + i % 2];
      sw += w[i];
      f[i] = p[8+3*i] * vx + p[9+3*i] * vy + p[10+3*i];
    end
    z = 0.0;
    for (int i = 0; i < 4; i++) z += w[i] / sw * f[i];
    return z;
  endfunction

endpackage
