// tb_fp_unit: self-checking test of the single precision operation unit.
// Random operands over a wide range are applied for each operation; the
// expected result is the exact real result of the same single precision
// operands rounded once to single precision (correct rounding), so results
// must match bit for bit. The one-clock latency is checked on every operation.
module tb_fp_unit;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        valid_i = 1'b0;
  logic [2:0]  op = 3'd0;
  logic [31:0] a = '0, b = '0, y;
  logic        valid_o;
  int          checks = 0, failures = 0;

  fp_unit dut (.clk(clk), .rst_n(rst_n), .valid_i(valid_i), .op_i(op), .a_i(a), .b_i(b),
               .valid_o(valid_o), .y_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [2:0] o, input real ra, input real rb);
    logic [31:0] fa, fb, exp;
    real         xa, xb, r;
    fa = to_fp(ra);
    fb = to_fp(rb);
    xa = to_real(fa);
    xb = to_real(fb);
    unique case (o)
      3'd0: r = xa + xb;
      3'd1: r = xa - xb;
      3'd2: r = xa * xb;
      3'd3: r = xa / xb;
      default: r = xa / 2.0;
    endcase
    exp = to_fp(r);
    @(negedge clk);
    op = o; a = fa; b = fb; valid_i = 1'b1;
    @(negedge clk);
    valid_i = 1'b0;
    checks++;
    if (!valid_o || (y != exp && !(y[30:0] == 0 && exp[30:0] == 0))) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h got=%h exp=%h valid=%b", o, fa, fb, y, exp, valid_o);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed cases: cancellation, equal operands, powers of two, ties
    run(3'd0, 1.0, -1.0);
    run(3'd1, 1.5, 1.5);
    run(3'd0, 1.0, pow2(-24));
    run(3'd0, 1.0, 3.0 * pow2(-24));
    run(3'd1, 1.0, pow2(-30));
    run(3'd2, 0.76, 2.1);
    run(3'd3, 1.0, 3.0);
    run(3'd3, 0.0, 3.0);
    run(3'd4, 0.375, 0.0);
    for (int n = 0; n < 4000; n++) begin
      real ra, rb;
      int  sa, sb;
      sa = $urandom_range(0, 40) - 20;
      sb = (n % 3 == 0) ? sa : $urandom_range(0, 40) - 20;
      ra = rand_real(-1.0, 1.0) * pow2(sa);
      rb = rand_real(-1.0, 1.0) * pow2(sb);
      if (rb == 0.0) rb = 1.0;
      run(3'(n % 5), ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
