// gauss_mf: approximation of a Gaussian membership function (layer 1).
//
// Two approximations are available, chosen by MF_TYPE:
//   MF_EQ9  mu = 1 + (x - m) / (sigma + |x - m|)   for x <  m
//           mu = 1 + (m - x) / (sigma + |m - x|)   for x >= m
//           three adders and one divider, no multiplier;
//   MF_EQ10 mu = sigma^2 / (sigma^2 + (x - m)^2)
//           two adders, two multipliers and one divider.
// Both are computed in a four-stage pipeline, one floating-point operation
// per stage and per operator, so a new input can enter every clock and
// `valid_o` follows `valid_i` by LATENCY = 4 clocks. The formulas and the
// operator counts are those of the source design; the pipelining is this
// implementation's choice.
module gauss_mf
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter mf_type_e MF_TYPE = MF_EQ9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_i,
  input  fp32_t x_i,
  input  fp32_t m_i,
  input  fp32_t sigma_i,
  output logic  valid_o,
  output fp32_t mu_o
);

  localparam int unsigned LATENCY = 4;

  logic [LATENCY-1:0] vld;
  fp32_t d1, s1;          // stage 1: x - m, sigma (EQ9) or sigma^2 (EQ10)
  fp32_t n2, s2;          // stage 2: signed numerator (EQ9) or (x-m)^2, carried sigma term
  fp32_t n3, den3;        // stage 3: numerator and denominator
  fp32_t q4;              // stage 4: result

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], valid_i};
  end

  always_ff @(posedge clk) begin
    // stage 1
    d1 <= fp_sub(x_i, m_i);
    s1 <= (MF_TYPE == MF_EQ10) ? fp_mul(sigma_i, sigma_i) : sigma_i;
    // stage 2
    if (MF_TYPE == MF_EQ10) begin
      n2 <= fp_mul(d1, d1);
      s2 <= s1;
    end else begin
      // x < m gives a negative difference: keep it; otherwise use m - x
      n2 <= d1[31] ? d1 : fp_neg(d1);
      s2 <= fp_add(s1, fp_abs(d1));
    end
    // stage 3
    if (MF_TYPE == MF_EQ10) begin
      n3   <= s2;
      den3 <= fp_add(s2, n2);
    end else begin
      n3   <= fp_div(n2, s2);
      den3 <= FP_ZERO;
    end
    // stage 4
    q4 <= (MF_TYPE == MF_EQ10) ? fp_div(n3, den3) : fp_add(FP_ONE, n3);
  end

  assign valid_o = vld[LATENCY-1];
  assign mu_o    = q4;

endmodule
