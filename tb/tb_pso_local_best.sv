// tb_pso_local_best: self-checking test of stage 2 (fitness and local bests).
// Random particles and a random training set sit in modelled RAMs. Pass 1
// runs with `first_gen` set: every particle's fitness must be written to En
// (checked against a double precision model of the network and of
// En = 1/2 sum e^2, relative error 1e-3) and every particle copied to Pbest.
// Pass 2 stores new particles and preset old fitness values: huge for even
// particles (must be replaced) and zero for odd ones (must be kept), and
// checks En, Pbest and the update counter accordingly. Both passes check the
// cycle count against the documented formula. Pass 3 runs test mode on
// particle 0: the test fitness must match the model and En, Pbest and the
// update counter must stay as they were.
module tb_pso_local_best;
  import fp32_pkg::*;
  import nfs_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 4, S = 6, D = NUM_PARAM;
  logic     clk = 1'b0, rst_n = 1'b1, start = 1'b0, first_gen = 1'b1, test_mode = 1'b0, done;
  fp32_t    test_fit, z;
  logic     z_valid;
  logic [15:0] z_index;
  int       n_z = 0;
  ram_req_t p_req, pb_req, en_req, td_req;
  fp32_t    p_rd, en_rd, tdx, tdy, tdyd;
  logic [31:0] lb_updates;
  fp32_t    p_mem [N*D], pb_mem [N*D], en_mem [N], x_mem [S], y_mem [S], yd_mem [S];
  int       checks = 0, failures = 0, cyc = 0;

  pso_local_best #(.N(N), .SAMPLES(S), .MF_TYPE(MF_EQ9)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .first_gen(first_gen), .test_mode(test_mode),
    .p_req(p_req), .p_rdata(p_rd), .pb_req(pb_req), .en_req(en_req), .en_rdata(en_rd),
    .td_req(td_req), .td_x(tdx), .td_y(tdy), .td_yd(tdyd), .done(done), .lb_updates(lb_updates),
    .test_fitness(test_fit), .z_valid(z_valid), .z_index(z_index), .z_o(z));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (z_valid) n_z <= n_z + 1;
    if (p_req.en && !p_req.we) p_rd <= p_mem[p_req.addr];
    if (p_req.en && p_req.we) failures++;
    if (pb_req.en && pb_req.we) pb_mem[pb_req.addr] <= pb_req.wdata;
    if (en_req.en) begin
      if (en_req.we) en_mem[en_req.addr] <= en_req.wdata;
      else           en_rd <= en_mem[en_req.addr];
    end
    if (td_req.en) begin
      tdx  <= x_mem[td_req.addr];
      tdy  <= y_mem[td_req.addr];
      tdyd <= yd_mem[td_req.addr];
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fitness(int i);
    real pr [20], acc, e;
    for (int k = 0; k < D; k++) pr[k] = to_real(p_mem[i*D + k]);
    acc = 0.0;
    for (int j = 0; j < S; j++) begin
      e = to_real(yd_mem[j]) - nfs_model(pr, to_real(x_mem[j]), to_real(y_mem[j]), 1'b0);
      acc += 0.5 * e * e;
    end
    return acc;
  endfunction

  task automatic new_particles();
    for (int a = 0; a < N * D; a++) begin
      int k;
      k = a % D;
      if (k >= 8)    p_mem[a] = to_fp(rand_real(-5.0, 5.0));
      else if (k[0]) p_mem[a] = to_fp(rand_real(0.1, 2.0));
      else           p_mem[a] = to_fp(rand_real(-2.5, 2.5));
    end
  endtask

  task automatic run_pass(input int n_updates);
    int t0, lb0;
    lb0 = lb_updates;
    @(negedge clk) start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    // per particle: D+1 read, 1 clear, S*(2+11+5), 2 compare, D if replaced
    checks++;
    if (cyc - t0 != N * (D + 4 + S * 18) + n_updates * D + 1) begin
      failures++;
      $display("FAIL cycles %0d", cyc - t0);
    end
    checks++;
    if (lb_updates - lb0 != n_updates) failures++;
  endtask

  initial begin
    fp32_t old_p [N*D];
    for (int j = 0; j < S; j++) begin
      x_mem[j]  = to_fp(rand_real(-1.0, 1.0));
      y_mem[j]  = to_fp(rand_real(-1.0, 1.0));
      yd_mem[j] = to_fp(rand_real(-1.0, 1.0));
    end
    new_particles();
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // pass 1: first generation
    first_gen = 1'b1;
    run_pass(N);
    for (int i = 0; i < N; i++) begin
      real f;
      f = fitness(i);
      checks++;
      if (abs_r(to_real(en_mem[i]) - f) > 1e-3 * f + 1e-6) begin
        failures++;
        $display("FAIL En[%0d] got=%f exp=%f", i, to_real(en_mem[i]), f);
      end
      for (int k = 0; k < D; k++) begin
        checks++;
        if (pb_mem[i*D + k] != p_mem[i*D + k]) failures++;
      end
    end
    // pass 2: even particles improve (old En huge), odd ones do not (old En 0)
    old_p = pb_mem;
    new_particles();
    for (int i = 0; i < N; i++) en_mem[i] = (i % 2 == 0) ? to_fp(1e30) : 32'd0;
    first_gen = 1'b0;
    run_pass(N / 2);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (i % 2 == 0) begin
        if (abs_r(to_real(en_mem[i]) - fitness(i)) > 1e-3 * fitness(i) + 1e-6) failures++;
      end else if (en_mem[i] != 32'd0) failures++;
      for (int k = 0; k < D; k++) begin
        checks++;
        if (pb_mem[i*D + k] != ((i % 2 == 0) ? p_mem[i*D + k] : old_p[i*D + k])) failures++;
      end
    end
    // pass 3: test mode on particle 0
    begin
      fp32_t en_before [N], pb_before [N*D];
      int    lb0, z0;
      en_before = en_mem;
      pb_before = pb_mem;
      lb0 = lb_updates;
      z0  = n_z;
      test_mode = 1'b1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      test_mode = 1'b0;
      while (!done) @(negedge clk);
      checks += 4;
      if (abs_r(to_real(test_fit) - fitness(0)) > 1e-3 * fitness(0) + 1e-6) failures++;
      if (en_mem != en_before || pb_mem != pb_before) failures++;
      if (lb_updates != lb0) failures++;
      if (n_z - z0 != S) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
