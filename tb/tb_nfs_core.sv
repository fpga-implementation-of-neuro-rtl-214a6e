// tb_nfs_core: self-checking test of the five-layer neuro-fuzzy network.
// Random parameter sets (centres in [-2.5, 2.5], widths in [0.1, 2], rule
// parameters in [-100, 100]) and random inputs are applied, several samples
// back to back per parameter set. A double precision model of layers 1-5
// (grid rule pairing w1 = A1B1, w2 = A1B2, w3 = A2B1, w4 = A2B2) gives the
// expected output, compared within 1e-4 relative (plus 1e-3 absolute for
// outputs near zero). Both MF types are tested; the 11-clock latency is checked.
module tb_nfs_core;
  import tb_fp_pkg::*;
  import nfs_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1, vi = 1'b0;
  logic [31:0] x = '0, y = '0, z9, z10;
  logic        vo9, vo10;
  logic [31:0] params [NUM_PARAM];
  real         pr [NUM_PARAM];
  int          checks = 0, failures = 0, cyc = 0;

  nfs_core #(.MF_TYPE(MF_EQ9))  u9  (.clk(clk), .rst_n(rst_n), .valid_i(vi), .x_i(x), .y_i(y),
                                     .params(params), .valid_o(vo9), .z_o(z9));
  nfs_core #(.MF_TYPE(MF_EQ10)) u10 (.clk(clk), .rst_n(rst_n), .valid_i(vi), .x_i(x), .y_i(y),
                                     .params(params), .valid_o(vo10), .z_o(z10));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mf(real v, real m, real s, bit eq10);
    real d;
    d = v - m;
    if (eq10) return s * s / (s * s + d * d);
    return s / (s + abs_r(d));
  endfunction

  function automatic real model(real vx, real vy, bit eq10);
    real mu [4], w [4], f [4], sw, z;
    for (int k = 0; k < 4; k++) mu[k] = mf(k < 2 ? vx : vy, pr[2*k], pr[2*k+1], eq10);
    sw = 0.0;
    for (int i = 0; i < 4; i++) begin
      w[i] = mu[i / 2] * mu[2 + i % 2];
      sw += w[i];
      f[i] = pr[8+3*i] * vx + pr[9+3*i] * vy + pr[10+3*i];
    end
    z = 0.0;
    for (int i = 0; i < 4; i++) z += w[i] / sw * f[i];
    return z;
  endfunction

  real q9 [$], q10 [$];
  int  qt [$];

  function automatic void cmp(real got, real exp, string what);
    checks++;
    if (abs_r(got - exp) > 1e-4 * abs_r(exp) + 1e-3) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", what, got, exp);
    end
  endfunction

  always @(posedge clk) begin
    if (vo9 || vo10) begin
      checks++;
      if (!(vo9 && vo10) || q9.size() == 0) failures++;
      else begin
        int t;
        cmp(to_real(z9),  q9.pop_front(),  "eq9");
        cmp(to_real(z10), q10.pop_front(), "eq10");
        t = qt.pop_front();
        checks++;
        if (cyc - t != 11) begin
          failures++;
          $display("FAIL latency %0d", cyc - t);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < NUM_PARAM; k++) params[k] = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int set = 0; set < 40; set++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_PARAM; k++) begin
        real v;
        if (k >= 8)      v = rand_real(-100.0, 100.0);
        else if (k[0])   v = rand_real(0.1, 2.0);
        else             v = rand_real(-2.5, 2.5);
        params[k] = to_fp(v);
        pr[k]     = to_real(params[k]);
      end
      for (int n = 0; n < 10; n++) begin
        real rx, ry;
        x  = to_fp(rand_real(-1.5, 1.5));
        y  = to_fp(rand_real(-1.5, 1.5));
        rx = to_real(x);
        ry = to_real(y);
        q9.push_back(model(rx, ry, 1'b0));
        q10.push_back(model(rx, ry, 1'b1));
        qt.push_back(cyc);
        vi = 1'b1;
        @(negedge clk);
      end
      vi = 1'b0;
      repeat (14) @(negedge clk);  // drain before parameters change
    end
    checks++;
    if (q9.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
