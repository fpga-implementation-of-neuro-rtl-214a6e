// pso_update: stage 4 of training, the iPSO swarm update.
//
// For every element (particle i, parameter k) the block reads P, Pbest and
// Vm at address i*D+k and gbest at address k in the same clock, then computes
//   v' = zeta * [v + a1 r1 (pb - p) + a2 r2 (g - p)] + a3 * lambda
//   v' restricted to [-1, 1]
//   p' = p + v'
//   p' restricted to the interval of parameter k (nfs_pkg::param_lo/hi)
// and writes p' and v' back to P and Vm in the same clock. r1, r2 are uniform
// numbers in [0, 1) and lambda a roughly normal number, limited to
// [-2^-12, 2^-12]; all three come from outside, `rand_step` asks for fresh
// ones once per element. The constants are those of nfs_pkg. The equation,
// restriction order and limits follow the source design; the element-serial
// schedule of one floating-point step per clock is this implementation's own:
// an element takes 9 clocks, the swarm N*D*9 + 1. `vel_clips` and `pos_clips`
// count how often each restriction changed a value.
module pso_update
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter int unsigned N = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fp32_t       r1_i,
  input  fp32_t       r2_i,
  input  fp32_t       lambda_i,
  output logic        rand_step,
  output ram_req_t    p_req,
  input  fp32_t       p_rdata,
  output ram_req_t    pb_req,
  input  fp32_t       pb_rdata,
  output ram_req_t    vm_req,
  input  fp32_t       vm_rdata,
  output ram_req_t    gb_req,
  input  fp32_t       gb_rdata,
  output logic        done,
  output logic [31:0] vel_clips,
  output logic [31:0] pos_clips
);

  localparam int unsigned D = NUM_PARAM;

  typedef enum logic [3:0] {IDLE, RD, S1, S2, S3, S4, S5, S6, S7, WR} state_e;
  state_e state;

  logic [RAM_AW-1:0] i, k, addr;
  fp32_t p, v, dl, dg, a1r1, a2r2, lam, t1, t2, t3, u, vn, pn;
  fp32_t v_sum, v_res, p_sum, p_res;
  logic  v_clip, p_clip;

  fp_restrict u_vres (
    .value  (v_sum),
    .lo     (VEL_LO),
    .hi     (VEL_HI),
    .result (v_res),
    .clipped(v_clip)
  );

  fp_restrict u_pres (
    .value  (p_sum),
    .lo     (param_lo(32'(k))),
    .hi     (param_hi(32'(k))),
    .result (p_res),
    .clipped(p_clip)
  );

  assign v_sum = fp_add(fp_mul(ZETA, u), t3);
  assign p_sum = fp_add(p, vn);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      i         <= '0;
      k         <= '0;
      addr      <= '0;
      done      <= 1'b0;
      vel_clips <= '0;
      pos_clips <= '0;
      {p, v, dl, dg, a1r1, a2r2, lam, t1, t2, t3, u, vn, pn} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          i     <= '0;
          k     <= '0;
          addr  <= '0;
          state <= RD;
        end
        RD: state <= S1;
        S1: begin
          p     <= p_rdata;
          v     <= vm_rdata;
          dl    <= fp_sub(pb_rdata, p_rdata);
          dg    <= fp_sub(gb_rdata, p_rdata);
          a1r1  <= fp_mul(ALPHA1, r1_i);
          a2r2  <= fp_mul(ALPHA2, r2_i);
          lam   <= fp_clamp(lambda_i, LAMBDA_LO, LAMBDA_HI);
          state <= S2;
        end
        S2: begin
          t1    <= fp_mul(a1r1, dl);
          t2    <= fp_mul(a2r2, dg);
          t3    <= fp_mul(ALPHA3, lam);
          state <= S3;
        end
        S3: begin
          u     <= fp_add(v, t1);
          state <= S4;
        end
        S4: begin
          u     <= fp_add(u, t2);
          state <= S5;
        end
        S5: state <= S6;  // zeta * u + a3 lambda settles through u_vres
        S6: begin
          vn    <= v_res;
          if (v_clip) vel_clips <= vel_clips + 1;
          state <= S7;
        end
        S7: begin
          pn    <= p_res;
          if (p_clip) pos_clips <= pos_clips + 1;
          state <= WR;
        end
        WR: begin
          addr <= addr + 1'b1;
          if (k == RAM_AW'(D - 1)) begin
            k <= '0;
            if (i == RAM_AW'(N - 1)) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              i     <= i + 1'b1;
              state <= RD;
            end
          end else begin
            k     <= k + 1'b1;
            state <= RD;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    p_req  = RAM_IDLE;
    pb_req = RAM_IDLE;
    vm_req = RAM_IDLE;
    gb_req = RAM_IDLE;
    if (state == RD) begin
      p_req  = '{en: 1'b1, we: 1'b0, addr: addr, wdata: FP_ZERO};
      pb_req = '{en: 1'b1, we: 1'b0, addr: addr, wdata: FP_ZERO};
      vm_req = '{en: 1'b1, we: 1'b0, addr: addr, wdata: FP_ZERO};
      gb_req = '{en: 1'b1, we: 1'b0, addr: k,    wdata: FP_ZERO};
    end else if (state == WR) begin
      p_req  = '{en: 1'b1, we: 1'b1, addr: addr, wdata: pn};
      vm_req = '{en: 1'b1, we: 1'b1, addr: addr, wdata: vn};
    end
  end

  assign rand_step = state == S1;

endmodule
