// nfs_core: the five-layer Sugeno-type neuro-fuzzy system (ANFIS form).
//
// Two inputs x and y, two membership functions per input (A1, A2 on x and
// B1, B2 on y) and four rules:
//   layer 1  mu_A1(x), mu_A2(x), mu_B1(y), mu_B2(y)        (gauss_mf)
//   layer 2  w_i = mu_A(x) * mu_B(y), rule i pairing A(i/2) with B(i%2):
//            w1 = A1 B1, w2 = A1 B2, w3 = A2 B1, w4 = A2 B2
//   layer 3  normalised firing  wn_i = w_i / sum_k w_k
//   layer 4  wn_i * f_i with f_i = p_i x + q_i y + r_i
//   layer 5  z = sum_i wn_i f_i
// All arithmetic is single precision floating point (fp32_pkg). The network
// is an 11-stage pipeline: a sample (x, y) enters with `valid_i` and z leaves
// with `valid_o` LATENCY = 11 clocks later; one sample per clock may enter.
// The 20 parameters (`params`, layout in nfs_pkg) must stay stable while a
// sample is in flight. The rule pairing follows the usual grid partition;
// the pipeline and the evaluation order of the sums are this design's own.
module nfs_core
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter mf_type_e MF_TYPE = MF_EQ9
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_i,
  input  fp32_t      x_i,
  input  fp32_t      y_i,
  input  param_vec_t params,
  output logic       valid_o,
  output fp32_t      z_o
);

  localparam int unsigned LATENCY = 11;

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], valid_i};
  end
  assign valid_o = vld[LATENCY-1];

  // ---- layer 1: membership functions (clocks 1..4)
  fp32_t mu [4];
  logic  mu_vld [4];
  for (genvar k = 0; k < 4; k++) begin : g_mf
    gauss_mf #(.MF_TYPE(MF_TYPE)) u_mf (
      .clk    (clk),
      .rst_n  (rst_n),
      .valid_i(valid_i),
      .x_i    (k < 2 ? x_i : y_i),
      .m_i    (params[2*k]),
      .sigma_i(params[2*k+1]),
      .valid_o(mu_vld[k]),
      .mu_o   (mu[k])
    );
  end

  // ---- layer 4 consequents f_i = p x + q y + r, alongside layer 1 (clocks 1..3)
  fp32_t px [4], qy [4], pq [4], f3 [4];
  // f delayed to line up with the normalised firings (clock 8)
  fp32_t f_d [4][5];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      px[i] <= fp_mul(params[IDX_RULE0 + 3*i],     x_i);
      qy[i] <= fp_mul(params[IDX_RULE0 + 3*i + 1], y_i);
      pq[i] <= fp_add(px[i], qy[i]);
      f3[i] <= fp_add(pq[i], params[IDX_RULE0 + 3*i + 2]);
      f_d[i][0] <= f3[i];
      for (int s = 1; s < 5; s++) f_d[i][s] <= f_d[i][s-1];
    end
  end

  // ---- layer 2: rule firing (clock 5), firing sum (clocks 6, 7)
  fp32_t w5 [4], w6 [4], w7 [4];
  fp32_t s01, s23, ssum;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      w5[i] <= fp_mul(mu[i / 2], mu[2 + i % 2]);
      w6[i] <= w5[i];
      w7[i] <= w6[i];
    end
    s01  <= fp_add(w5[0], w5[1]);
    s23  <= fp_add(w5[2], w5[3]);
    ssum <= fp_add(s01, s23);
  end

  // ---- layer 3: normalisation (clock 8); layer 4 product (clock 9)
  fp32_t wn [4], wf [4];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      wn[i] <= fp_div(w7[i], ssum);
      wf[i] <= fp_mul(wn[i], f_d[i][4]);
    end
  end

  // ---- layer 5: output sum (clocks 10, 11)
  fp32_t t01, t23, z;
  always_ff @(posedge clk) begin
    t01 <= fp_add(wf[0], wf[1]);
    t23 <= fp_add(wf[2], wf[3]);
    z   <= fp_add(t01, t23);
  end
  assign z_o = z;

endmodule
