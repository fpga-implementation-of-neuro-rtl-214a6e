// tb_gauss_mf: self-checking test of both Gaussian MF approximations.
// Random x, m, sigma are applied to an Eq.-9 and an Eq.-10 instance, one per
// clock (pipelined). Expected values are computed in double precision from
//   Eq. 9:  1 + (x-m)/(sigma+|x-m|) for x < m, 1 + (m-x)/(sigma+|m-x|) otherwise
//   Eq. 10: sigma^2 / (sigma^2 + (x-m)^2)
// and compared within a relative error of 1e-5. The 4-clock latency is
// checked by counting clocks between input and output valid.
module tb_gauss_mf;
  import tb_fp_pkg::*;
  import nfs_pkg::*;

  localparam int NV = 500;
  logic        clk = 1'b0, rst_n = 1'b1, vi = 1'b0;
  logic [31:0] x = '0, m = '0, s = '0, mu9, mu10;
  logic        vo9, vo10;
  int          checks = 0, failures = 0;
  real         e9 [NV], e10 [NV];
  int          t_in [NV];
  int          cyc = 0, nin = 0, nout = 0;

  gauss_mf #(.MF_TYPE(MF_EQ9))  u9  (.clk(clk), .rst_n(rst_n), .valid_i(vi), .x_i(x), .m_i(m),
                                     .sigma_i(s), .valid_o(vo9), .mu_o(mu9));
  gauss_mf #(.MF_TYPE(MF_EQ10)) u10 (.clk(clk), .rst_n(rst_n), .valid_i(vi), .x_i(x), .m_i(m),
                                     .sigma_i(s), .valid_o(vo10), .mu_o(mu10));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cmp(real got, real exp, string what);
    checks++;
    if (abs_r(got - exp) > 1e-5 * abs_r(exp) + 1e-7) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", what, got, exp);
    end
  endfunction

  // output side
  always @(posedge clk) begin
    if (vo9 != vo10) begin
      checks++; failures++;
    end
    if (vo9) begin
      cmp(to_real(mu9),  e9[nout],  "eq9");
      cmp(to_real(mu10), e10[nout], "eq10");
      checks++;
      if (cyc - t_in[nout] != 4) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[nout]);
      end
      nout++;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NV; n++) begin
      real rx, rm, rs, d;
      @(negedge clk);
      rx = (n == 0) ? 0.5 : rand_real(-3.0, 3.0);
      rm = (n == 0) ? 0.5 : rand_real(-2.5, 2.5);
      rs = rand_real(0.1, 2.0);
      x = to_fp(rx); m = to_fp(rm); s = to_fp(rs);
      rx = to_real(x); rm = to_real(m); rs = to_real(s);
      d = rx - rm;
      e9[n]  = (rx < rm) ? 1.0 + d / (rs + abs_r(d)) : 1.0 + (-d) / (rs + abs_r(d));
      e10[n] = rs * rs / (rs * rs + d * d);
      t_in[n] = cyc;
      vi = ($urandom_range(0, 3) != 0) || n == 0 ? 1'b1 : 1'b0;
      if (!vi) begin
        n--;
        continue;
      end
    end
    @(negedge clk) vi = 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (nout != NV) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
