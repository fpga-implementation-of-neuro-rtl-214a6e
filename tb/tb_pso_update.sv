// tb_pso_update: self-checking test of stage 4 (iPSO velocity and position
// update with restriction). P, Pbest, Vm and gbest live in modelled RAMs
// with random contents, some of them chosen so that velocities and positions
// run into their limits. The random inputs r1, r2, lambda are changed by the
// testbench on every `rand_step` and recorded. The expected new velocity and
// position of every element are computed in double precision from
//   v' = clamp(0.76 [v + 2.1 r1 (pb - p) + 2.1 r2 (g - p)] + 2^-12 clamp(lambda), -1, 1)
//   p' = clamp(p + v', interval of parameter k)
// and compared within 1e-5 (relative) + 1e-6. The clip counters and the
// N*D*9 + 1 clock duration are checked too.
module tb_pso_update;
  import fp32_pkg::*;
  import nfs_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 3, D = NUM_PARAM;
  logic     clk = 1'b0, rst_n = 1'b1, start = 1'b0, done, step;
  fp32_t    r1 = '0, r2 = '0, lam = '0;
  ram_req_t p_req, pb_req, vm_req, gb_req;
  fp32_t    p_rd, pb_rd, vm_rd, gb_rd;
  logic [31:0] vclips, pclips;
  fp32_t    p_mem [N*D], pb_mem [N*D], vm_mem [N*D], gb_mem [D];
  real      rr1 [$], rr2 [$], rlam [$];
  int       checks = 0, failures = 0, cyc = 0;

  pso_update #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .r1_i(r1), .r2_i(r2), .lambda_i(lam), .rand_step(step),
    .p_req(p_req), .p_rdata(p_rd), .pb_req(pb_req), .pb_rdata(pb_rd),
    .vm_req(vm_req), .vm_rdata(vm_rd), .gb_req(gb_req), .gb_rdata(gb_rd),
    .done(done), .vel_clips(vclips), .pos_clips(pclips));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (p_req.en)  begin if (p_req.we)  p_mem[p_req.addr]  <= p_req.wdata;  else p_rd  <= p_mem[p_req.addr];  end
    if (vm_req.en) begin if (vm_req.we) vm_mem[vm_req.addr] <= vm_req.wdata; else vm_rd <= vm_mem[vm_req.addr]; end
    if (pb_req.en) begin if (pb_req.we) failures++; else pb_rd <= pb_mem[pb_req.addr]; end
    if (gb_req.en) begin if (gb_req.we) failures++; else gb_rd <= gb_mem[gb_req.addr]; end
    if (step) begin
      rr1.push_back(to_real(r1));
      rr2.push_back(to_real(r2));
      rlam.push_back(to_real(lam));
      r1  <= to_fp(rand_real(0.0, 1.0));
      r2  <= to_fp(rand_real(0.0, 1.0));
      lam <= to_fp(rand_real(-4e-4, 4e-4));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampr(real v, real lo, real hi);
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    real ep [N*D], ev [N*D];
    int  nv, np, t0;
    for (int a = 0; a < N * D; a++) begin
      int k;
      k = a % D;
      p_mem[a]  = to_fp(k >= 8 ? rand_real(-99.0, 99.0) : (k[0] ? rand_real(0.1, 2.0) : rand_real(-2.5, 2.5)));
      pb_mem[a] = to_fp(to_real(p_mem[a]) + rand_real(-0.5, 0.5));
      vm_mem[a] = to_fp(rand_real(-1.0, 1.0));
      if (a < D) gb_mem[a] = to_fp(to_real(p_mem[a]) + rand_real(-1.0, 1.0));
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    r1  = to_fp(0.5); r2 = to_fp(0.25); lam = to_fp(1e-4);
    // expected values need the old contents
    begin
      fp32_t p0 [N*D], v0 [N*D];
      p0 = p_mem;
      v0 = vm_mem;
      start = 1'b1;
      t0 = cyc;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != N * D * 9 + 1) begin
        failures++;
        $display("FAIL cycles %0d", cyc - t0);
      end
      nv = 0;
      np = 0;
      for (int a = 0; a < N * D; a++) begin
        real p, v, pb, g, vn, pn, u, l;
        int  k;
        k  = a % D;
        p  = to_real(p0[a]);
        v  = to_real(v0[a]);
        pb = to_real(pb_mem[a]);
        g  = to_real(gb_mem[k]);
        l  = clampr(rlam[a], -pow2(-12), pow2(-12));
        u  = 0.76 * (v + 2.1 * rr1[a] * (pb - p) + 2.1 * rr2[a] * (g - p)) + pow2(-12) * l;
        vn = clampr(u, -1.0, 1.0);
        if (vn != u) nv++;
        u  = p + vn;
        pn = (k >= 8) ? clampr(u, -100.0, 100.0) : (k[0] ? clampr(u, 0.1, 2.0) : clampr(u, -2.5, 2.5));
        if (pn != u) np++;
        checks += 2;
        if (abs_r(to_real(vm_mem[a]) - vn) > 1e-5 * abs_r(vn) + 1e-6) begin
          failures++;
          $display("FAIL v[%0d] got=%f exp=%f", a, to_real(vm_mem[a]), vn);
        end
        if (abs_r(to_real(p_mem[a]) - pn) > 1e-5 * abs_r(pn) + 1e-6) begin
          failures++;
          $display("FAIL p[%0d] got=%f exp=%f", a, to_real(p_mem[a]), pn);
        end
      end
      checks += 4;
      if (vclips != nv || pclips != np) begin
        failures++;
        $display("FAIL clips v %0d/%0d p %0d/%0d", vclips, nv, pclips, np);
      end
      if (nv == 0 || np == 0) failures++;
      if (rr1.size() != N * D) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
