// fp_unit: one IEEE-754 single precision operation per clock.
//
// The arithmetic library of the trainer: an operand pair and an operation
// code are taken when `valid_i` is high and the rounded result is presented
// one clock later with `valid_o`. Operations are add, subtract, multiply,
// divide and halve (exponent decrement, operand a only). The arithmetic is
// that of fp32_pkg (round to nearest even, subnormals flushed to zero).
// The source design reuses an earlier floating-point library whose insides it
// does not give; this single-cycle unit is this implementation's own.
module fp_unit
  import fp32_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_i,
  input  logic [2:0] op_i,     // 0 add, 1 sub, 2 mul, 3 div, 4 half
  input  fp32_t      a_i,
  input  fp32_t      b_i,
  output logic       valid_o,
  output fp32_t      y_o
);

  fp32_t y_d;

  always_comb begin
    unique case (op_i)
      3'd0:    y_d = fp_add(a_i, b_i);
      3'd1:    y_d = fp_sub(a_i, b_i);
      3'd2:    y_d = fp_mul(a_i, b_i);
      3'd3:    y_d = fp_div(a_i, b_i);
      3'd4:    y_d = fp_half(a_i);
      default: y_d = FP_ZERO;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      y_o     <= FP_ZERO;
    end else begin
      valid_o <= valid_i;
      if (valid_i) y_o <= y_d;
    end
  end

endmodule
