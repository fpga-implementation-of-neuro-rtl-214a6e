// lcg_rng: linear congruential random number generator.
//
// Each clock with `step` high the state advances as
//   X(n+1) = (A * X(n) + B) mod 2^32,
// the recurrence the source design uses for its random numbers. The
// constants A, B, the modulus 2^32 and the seed are this implementation's own
// choice (the common 1664525 / 1013904223 pair). `uniform` is the state's top
// 23 bits read as a float in [0, 1): the word 1.f (exponent 127) minus 1.0.
// `raw` is the state itself. Both outputs are registered state, valid at once.
module lcg_rng
  import fp32_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1234_5678,
  parameter logic [31:0] A    = 32'd1664525,
  parameter logic [31:0] B    = 32'd1013904223
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] raw,
  output fp32_t       uniform
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    raw <= SEED;
    else if (step) raw <= A * raw + B;
  end

  assign uniform = fp_sub({1'b0, 8'd127, raw[31:9]}, FP_ONE);

endmodule
