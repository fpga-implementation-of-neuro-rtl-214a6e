// tb_pso_global_best: self-checking test of stage 3. Random fitness values
// and local bests are placed in modelled RAMs; the testbench checks that the
// index and fitness of the smallest En are reported, that exactly that row
// of Pbest is copied into gbest, and the N + D + 3 clock duration.
module tb_pso_global_best;
  import fp32_pkg::*;
  import nfs_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 7, D = NUM_PARAM;
  logic     clk = 1'b0, rst_n = 1'b1, start = 1'b0, done;
  ram_req_t en_req, pb_req, gb_req;
  fp32_t    en_rd, pb_rd, gb_fit;
  logic [15:0] gb_idx;
  fp32_t    en_mem [N], pb_mem [N*D], gb_mem [D];
  int       checks = 0, failures = 0, cyc = 0;

  pso_global_best #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .en_req(en_req), .en_rdata(en_rd), .pb_req(pb_req), .pb_rdata(pb_rd), .gb_req(gb_req),
    .gb_fitness(gb_fit), .gb_index(gb_idx), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (en_req.en) en_rd <= en_mem[en_req.addr];
    if (pb_req.en) pb_rd <= pb_mem[pb_req.addr];
    if (gb_req.en && gb_req.we) gb_mem[gb_req.addr] <= gb_req.wdata;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      int  best, t0;
      real bv;
      best = 0;
      bv   = 1e30;
      for (int i = 0; i < N; i++) begin
        real v;
        v = rand_real(0.001, 10.0);
        en_mem[i] = to_fp(v);
        if (to_real(en_mem[i]) < bv) begin
          bv = to_real(en_mem[i]);
          best = i;
        end
      end
      for (int a = 0; a < N * D; a++) pb_mem[a] = $urandom;
      for (int a = 0; a < D; a++) gb_mem[a] = '0;
      @(negedge clk) start = 1'b1;
      t0 = cyc;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      checks += 3;
      if (cyc - t0 != N + D + 3) begin
        failures++;
        $display("FAIL cycles %0d", cyc - t0);
      end
      if (gb_idx != 16'(best)) failures++;
      if (gb_fit != en_mem[best]) failures++;
      for (int k = 0; k < D; k++) begin
        checks++;
        if (gb_mem[k] != pb_mem[best * D + k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
