// tb_fitness_unit: self-checking test of the sum-of-squared-error fitness.
// Series of random (yd, z) pairs are fed after a clear; after each sample the
// running value En = 1/2 sum (yd - z)^2 is compared with a double precision
// sum (relative error 1e-5), and `done` must come 5 clocks after `start`.
module tb_fitness_unit;
  import tb_fp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1, clr = 1'b0, start = 1'b0;
  logic [31:0] yd = '0, z = '0, en;
  logic        busy, done;
  int          checks = 0, failures = 0;

  fitness_unit dut (.clk(clk), .rst_n(rst_n), .clr(clr), .start(start), .yd_i(yd), .z_i(z),
                    .busy(busy), .done(done), .en_o(en));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      real acc;
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      acc = 0.0;
      for (int j = 0; j < 50; j++) begin
        real a, b;
        int  lat;
        yd = to_fp(rand_real(-2.0, 2.0));
        z  = to_fp(rand_real(-2.0, 2.0));
        a  = to_real(yd);
        b  = to_real(z);
        acc += 0.5 * (a - b) * (a - b);
        start = 1'b1;
        @(negedge clk) start = 1'b0;
        lat = 1;
        while (!done) begin
          @(negedge clk);
          lat++;
        end
        checks += 2;
        if (lat != 5) begin
          failures++;
          $display("FAIL latency %0d", lat);
        end
        if (abs_r(to_real(en) - acc) > 1e-5 * acc + 1e-7) begin
          failures++;
          if (failures < 10) $display("FAIL En got=%f exp=%f", to_real(en), acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
