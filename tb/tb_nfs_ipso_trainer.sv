// tb_nfs_ipso_trainer: end-to-end test of the trainer on the first system
// identification benchmark,
//   y(k+1) = y(k) / (1 + y(k)^2) + u(k)^3,   u(k) = cos(2 pi k / 100),
// with network inputs u(k), y(k) and desired output y(k+1). The training set
// is generated here and loaded through the host port, training is started,
// and the testbench follows the stage output. It checks:
//   - stage order 1 -> (2 -> 3 -> 4) x G_MAX and the final iteration count;
//   - the global best fitness never gets worse and improves at least once;
//   - the trained parameters read back from gbest reproduce the reported
//     fitness in a double precision model of network and cost (1e-3 relative);
//   - that every mechanism happened: initialisation, local best replacement
//     after the first generation, velocity restriction, position restriction;
//   - the licence-plate feature front end on a striped image: edge count,
//     mean and variance against a reference Sobel filter and threshold.
// It runs at a reduced swarm, training set and generation count.
module tb_nfs_ipso_trainer;
  import fp32_pkg::*;
  import nfs_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 8, S = 20, G = 10;
  localparam int IW = 16, IH = 8, TH = 100;
  localparam int WATCHDOG = 3_000_000;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, test_start = 1'b0;
  logic        td_we = 1'b0;
  logic [15:0] td_addr = '0, gb_raddr = '0, gb_index;
  fp32_t       td_x = '0, td_y = '0, td_yd = '0, gb_rdata, gb_fitness, test_fitness, nfs_z;
  logic        nfs_z_valid;
  logic [15:0] nfs_z_index;
  int          n_z = 0;
  logic        img_we = 1'b0, fe_start = 1'b0, fe_busy, fe_done;
  logic [15:0] img_addr = '0;
  logic [7:0]  img_data = '0;
  logic [31:0] fe_cnt;
  fp32_t       fe_mean, fe_var;
  real         z_seen [S];
  logic        busy, done;
  logic [1:0]  stage;
  logic [31:0] iteration, lb_updates, vel_clips, pos_clips;
  real         xs [S], ys [S], yds [S];
  int          checks = 0, failures = 0, cyc = 0;

  nfs_ipso_trainer #(.N(N), .SAMPLES(S), .G_MAX(G), .IMG_W(IW), .IMG_H(IH), .THRESH(TH)) dut (
    .clk(clk), .rst_n(rst_n), .td_we(td_we), .td_addr(td_addr), .td_x(td_x), .td_y(td_y),
    .td_yd(td_yd), .start(start), .test_start(test_start), .busy(busy), .done(done), .stage(stage), .iteration(iteration),
    .gb_raddr(gb_raddr), .gb_rdata(gb_rdata), .gb_fitness(gb_fitness), .gb_index(gb_index),
    .test_fitness(test_fitness), .nfs_z_valid(nfs_z_valid), .nfs_z_index(nfs_z_index), .nfs_z(nfs_z),
    .lb_updates(lb_updates), .vel_clips(vel_clips), .pos_clips(pos_clips),
    .img_we(img_we), .img_addr(img_addr), .img_data(img_data), .fe_start(fe_start),
    .fe_busy(fe_busy), .fe_done(fe_done), .fe_edge_count(fe_cnt), .fe_mean(fe_mean),
    .fe_variance(fe_var));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (nfs_z_valid) begin
      n_z <= n_z + 1;
      z_seen[nfs_z_index] <= to_real(nfs_z);
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage monitor
  int   n_init = 0, n2 = 0, n3 = 0, n4 = 0, improved = 0, order_err = 0;
  logic [1:0] last_stage = 2'd0;
  fp32_t last_fit = FP_MAX;
  always @(negedge clk) begin
    if (busy && stage == 2'd0) n_init <= n_init + 1;
    if (busy && stage != last_stage) begin
      unique case (stage)
        2'd1: begin n2 <= n2 + 1; if (last_stage != 2'd0 && last_stage != 2'd3) order_err <= order_err + 1; end
        2'd2: begin n3 <= n3 + 1; if (last_stage != 2'd1) order_err <= order_err + 1; end
        2'd3: begin n4 <= n4 + 1; if (last_stage != 2'd2) order_err <= order_err + 1; end
        default: order_err <= order_err + 1;
      endcase
    end
    // global best reported at the end of stage 3
    if (busy && last_stage == 2'd2 && stage == 2'd3) begin
      checks++;
      if (fp_lt(last_fit, gb_fitness)) begin
        failures++;
        $display("FAIL global best got worse: %f -> %f", to_real(last_fit), to_real(gb_fitness));
      end
      if (fp_lt(gb_fitness, last_fit) && last_fit != FP_MAX) improved <= improved + 1;
      last_fit <= gb_fitness;
    end
    last_stage <= busy ? stage : 2'd0;
  end

  initial begin
    real yk, pr [20], fit;
    int  t0;
    // Example 1 data
    yk = 0.0;
    for (int j = 0; j < S; j++) begin
      real u;
      u = $cos(2.0 * 3.14159265358979 * real'(j + 1) / 100.0);
      xs[j]  = to_real(to_fp(u));
      ys[j]  = to_real(to_fp(yk));
      yk     = yk / (1.0 + yk * yk) + u * u * u;
      yds[j] = to_real(to_fp(yk));
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < S; j++) begin
      @(negedge clk);
      td_we = 1'b1; td_addr = 16'(j);
      td_x = to_fp(xs[j]); td_y = to_fp(ys[j]); td_yd = to_fp(yds[j]);
    end
    @(negedge clk) td_we = 1'b0;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    $display("training took %0d clocks, final fitness %f (particle %0d)",
             cyc - t0, to_real(gb_fitness), gb_index);
    $display("init clocks %0d, stage2 %0d, stage3 %0d, stage4 %0d, lb updates %0d, v clips %0d, p clips %0d, improvements %0d",
             n_init, n2, n3, n4, lb_updates, vel_clips, pos_clips, improved);
    // read the trained parameters back
    for (int k = 0; k < NUM_PARAM; k++) begin
      gb_raddr = 16'(k);
      @(negedge clk);
      pr[k] = to_real(gb_rdata);
    end
    fit = 0.0;
    for (int j = 0; j < S; j++) begin
      real e;
      e = yds[j] - nfs_model(pr, xs[j], ys[j], 1'b0);
      fit += 0.5 * e * e;
    end
    checks += 10;
    if (abs_r(fit - to_real(gb_fitness)) > 1e-3 * fit + 1e-6) begin
      failures++;
      $display("FAIL model fitness %f vs reported %f", fit, to_real(gb_fitness));
    end
    if (iteration != G)                  begin failures++; $display("FAIL iteration %0d", iteration); end
    if (n2 != G || n3 != G || n4 != G)   begin failures++; $display("FAIL stage counts"); end
    if (order_err != 0)                  begin failures++; $display("FAIL stage order"); end
    if (n_init != 2 * N * NUM_PARAM + 2) begin failures++; $display("FAIL init clocks %0d", n_init); end
    if (lb_updates <= N)                 begin failures++; $display("FAIL no local best update after generation 1"); end
    if (vel_clips == 0)                  begin failures++; $display("FAIL no velocity restriction"); end
    if (pos_clips == 0)                  begin failures++; $display("FAIL no position restriction"); end
    if (improved == 0)                   begin failures++; $display("FAIL global best never improved"); end
    if (!done || busy)                   failures++;
    if (n_z != N * S * G)                begin failures++; $display("FAIL output count %0d", n_z); end
    // test phase: u(k) = sin(2 pi k / 100), network built from gbest
    yk = 0.0;
    for (int j = 0; j < S; j++) begin
      real u;
      u = $sin(2.0 * 3.14159265358979 * real'(j + 1) / 100.0);
      xs[j]  = to_real(to_fp(u));
      ys[j]  = to_real(to_fp(yk));
      yk     = yk / (1.0 + yk * yk) + u * u * u;
      yds[j] = to_real(to_fp(yk));
      @(negedge clk);
      td_we = 1'b1; td_addr = 16'(j);
      td_x = to_fp(xs[j]); td_y = to_fp(ys[j]); td_yd = to_fp(yds[j]);
    end
    @(negedge clk) td_we = 1'b0;
    test_start = 1'b1;
    @(negedge clk) test_start = 1'b0;
    checks++;
    if (!busy) failures++;
    while (!done) @(negedge clk);
    fit = 0.0;
    for (int j = 0; j < S; j++) begin
      real e, zm;
      zm = nfs_model(pr, xs[j], ys[j], 1'b0);
      e = yds[j] - zm;
      fit += 0.5 * e * e;
      checks++;
      if (abs_r(z_seen[j] - zm) > 1e-3 * abs_r(zm) + 1e-4) failures++;
    end
    $display("test fitness %f (model %f)", to_real(test_fitness), fit);
    checks += 2;
    if (abs_r(fit - to_real(test_fitness)) > 1e-3 * fit + 1e-6) failures++;
    if (n_z != N * S * G + S) failures++;
    // feature front end: image with vertical stripes of varying width
    begin
      int im [IH][IW];
      int rc;
      real fm;
      for (int r = 0; r < IH; r++)
        for (int c = 0; c < IW; c++) begin
          im[r][c] = ((c / (2 + r % 3)) % 2 == 0) ? 200 : 30;
          @(negedge clk);
          img_we = 1'b1; img_addr = 16'(r * IW + c); img_data = 8'(im[r][c]);
        end
      @(negedge clk) img_we = 1'b0;
      rc = 0;
      for (int r = 1; r < IH - 1; r++)
        for (int c = 1; c < IW - 1; c++) begin
          int g;
          g = im[r-1][c+1] - im[r-1][c-1] + 2 * (im[r][c+1] - im[r][c-1]) + im[r+1][c+1] - im[r+1][c-1];
          if ((g < 0 ? -g : g) > TH) rc++;
        end
      fm = real'(rc) / real'((IW - 2) * (IH - 2));
      fe_start = 1'b1;
      @(negedge clk) fe_start = 1'b0;
      while (!fe_done) @(negedge clk);
      $display("features: %0d edge pixels, mean %f, variance %f", fe_cnt, to_real(fe_mean), to_real(fe_var));
      checks += 4;
      if (fe_cnt != 32'(rc) || rc == 0) failures++;
      if (abs_r(to_real(fe_mean) - fm) > 1e-6) failures++;
      if (abs_r(to_real(fe_var) - fm * (1.0 - fm)) > 1e-6) failures++;
      if (!done) failures++;   // trainer untouched by the front end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
