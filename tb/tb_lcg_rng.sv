// tb_lcg_rng: self-checking test of the linear congruential generator.
// The state sequence is compared with X(n+1) = (1664525 X(n) + 1013904223)
// mod 2^32 computed in the testbench, the float output with the state's top
// 23 bits divided by 2^23, and the state must hold while `step` is low.
// The mean of 20000 uniform outputs must lie within 0.5 +/- 0.01.
module tb_lcg_rng;
  import tb_fp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1, step = 1'b0;
  logic [31:0] raw, u;
  int          checks = 0, failures = 0;

  lcg_rng #(.SEED(32'd42)) dut (.clk(clk), .rst_n(rst_n), .step(step), .raw(raw), .uniform(u));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    real sum;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    x = 32'd42;
    sum = 0.0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks += 2;
      if (raw != x) begin
        failures++;
        if (failures < 10) $display("FAIL raw %h exp %h", raw, x);
      end
      if (to_real(u) != real'(x[31:9]) / 8388608.0) failures++;
      sum += to_real(u);
      step = (n % 7 != 3);
      if (step) x = 32'd1664525 * x + 32'd1013904223;
    end
    checks++;
    if (abs_r(sum / 20000.0 - 0.5) > 0.01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
