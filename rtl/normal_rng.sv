// normal_rng: approximately normal random numbers for the lambda term of iPSO.
//
// Four linear congruential generators (lcg_rng) with different seeds step
// together; the top 16 bits of each are summed, the mean 2*65536 is removed
// and the result is scaled by sqrt(3)/65536, which gives zero mean and unit
// variance (sum of four uniform numbers, a common approximation of a normal
// distribution). The source design asks for a normally distributed vector but
// does not say how it is generated: this construction is this
// implementation's own. `value` is combinational from the generators' state
// and changes on the clock after `step`.
module normal_rng
  import fp32_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h0BAD_5EED
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  output fp32_t value
);

  localparam fp32_t SCALE = 32'h37DD_B3D7;  // sqrt(3) / 65536

  logic [31:0] raw [4];
  fp32_t       unused_u [4];

  for (genvar g = 0; g < 4; g++) begin : g_lcg
    lcg_rng #(.SEED(SEED ^ (32'h9E37_79B9 * (g + 1)))) u_lcg (
      .clk    (clk),
      .rst_n  (rst_n),
      .step   (step),
      .raw    (raw[g]),
      .uniform(unused_u[g])
    );
  end

  logic signed [31:0] sum;
  always_comb begin
    sum = -32'sd131072;
    for (int g = 0; g < 4; g++) sum = sum + 32'(raw[g][31:16]);
    value = fp_mul(fp_from_int(sum), SCALE);
  end

endmodule
