// tb_pso_init: self-checking test of stage 1 (random initial swarm).
// The testbench supplies a known number sequence as the "random" input and
// models the three RAMs. It checks that P and Pbest receive the same N*D
// numbers in order with out_flg = 01, then Vm the next N*D numbers with
// out_flg = 10, that nothing else is written, and that `done` comes
// 2*N*D + 1 clocks after `start`.
module tb_pso_init;
  import fp32_pkg::*;
  import nfs_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 3, D = NUM_PARAM, LEN = N * D;
  logic     clk = 1'b0, rst_n = 1'b1, start = 1'b0, step, done;
  fp32_t    rnd;
  ram_req_t p_req, pb_req, vm_req;
  logic [1:0] out_flg;
  fp32_t    p_mem [LEN], pb_mem [LEN], vm_mem [LEN];
  int       cnt = 0, checks = 0, failures = 0, cyc = 0;

  pso_init #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .rand_i(rnd), .rand_step(step),
                         .p_req(p_req), .pb_req(pb_req), .vm_req(vm_req), .out_flg(out_flg), .done(done));

  always #5 clk = ~clk;
  assign rnd = to_fp(real'(cnt) / 256.0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (step) cnt <= cnt + 1;
    if (p_req.en && p_req.we) begin
      p_mem[p_req.addr] <= p_req.wdata;
      checks++;
      if (out_flg != 2'b01) failures++;
    end
    if (pb_req.en && pb_req.we) pb_mem[pb_req.addr] <= pb_req.wdata;
    if (vm_req.en && vm_req.we) begin
      vm_mem[vm_req.addr] <= vm_req.wdata;
      checks++;
      if (out_flg != 2'b10) failures++;
    end
    if ((p_req.en && p_req.addr >= LEN) || (vm_req.en && vm_req.addr >= LEN)) failures++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != 2 * LEN + 1) begin
      failures++;
      $display("FAIL cycles %0d", cyc - t0);
    end
    for (int a = 0; a < LEN; a++) begin
      checks += 3;
      if (p_mem[a]  != to_fp(real'(a) / 256.0))       failures++;
      if (pb_mem[a] != p_mem[a])                      failures++;
      if (vm_mem[a] != to_fp(real'(a + LEN) / 256.0)) failures++;
    end
    checks++;
    if (out_flg != 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
