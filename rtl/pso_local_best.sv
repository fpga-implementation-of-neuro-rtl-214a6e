// pso_local_best: stage 2 of training, fitness of every particle and update
// of the local bests.
//
// For each particle i of the swarm in turn:
//   1. its D parameters are read from P_RAM into the network's parameter
//      registers (one word per clock);
//   2. every training sample (x, y, yd) is read from the training RAMs and
//      run through the network (nfs_core); the fitness unit accumulates
//      En = 1/2 sum (yd - z)^2 over all samples;
//   3. the stored fitness En_RAM[i] is read; if it is larger than the new
//      value (or when `first_gen` is set, since nothing is stored yet) the
//      new value is written to En_RAM[i] and the particle to Pbest_RAM.
// `done` pulses once all N particles are processed.
//
// Test mode (`test_mode` high at `start`): a single parameter vector is read
// from address 0 up (the owner routes this to the gbest RAM), the samples are
// run and the fitness is left on `test_fitness`; En and Pbest are not
// touched. This is how a trained network is evaluated on a test set.
// Every network output is also presented on `z_valid`/`z_o` with the sample
// index on `z_index`, for use outside (e.g. a decision on each sample). Samples go through the
// network one at a time. RAM requests are ram_req_t records; read data is
// expected one clock after a read request. The order of work follows the
// source design; the sequencing details are this implementation's own.
// Cycle count per particle: D + 4 + SAMPLES * 18 (read, start and 11-clock
// network latency, 5-clock fitness step), plus D when the local best is
// replaced; `done` follows the last particle by one clock.
module pso_local_best
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter int unsigned N       = 100,
  parameter int unsigned SAMPLES = 100,
  parameter mf_type_e    MF_TYPE = MF_EQ9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        first_gen,
  input  logic        test_mode,
  // P_RAM (read), Pbest_RAM (write), En_RAM (read/write)
  output ram_req_t    p_req,
  input  fp32_t       p_rdata,
  output ram_req_t    pb_req,
  output ram_req_t    en_req,
  input  fp32_t       en_rdata,
  // training samples, one address for the three RAMs x, y, yd
  output ram_req_t    td_req,
  input  fp32_t       td_x,
  input  fp32_t       td_y,
  input  fp32_t       td_yd,
  output logic        done,
  output logic [31:0] lb_updates,   // local bests replaced since reset
  output fp32_t       test_fitness,
  output logic        z_valid,
  output logic [RAM_AW-1:0] z_index,
  output fp32_t       z_o
);

  localparam int unsigned D = NUM_PARAM;

  typedef enum logic [3:0] {
    IDLE, RD_P, FIT_CLR, SMP_RD, SMP_GO, SMP_NFS, SMP_FIT, EN_RD, EN_CMP, WR_PB
  } state_e;
  state_e state;
  logic   test_q;

  logic [RAM_AW-1:0] i, base, k, j;
  param_vec_t        params;
  fp32_t             yd_q;

  // network and fitness unit
  logic  nfs_vi, nfs_vo;
  fp32_t nfs_z;
  logic  fit_clr, fit_start, fit_busy, fit_done;
  fp32_t en_new;

  nfs_core #(.MF_TYPE(MF_TYPE)) u_nfs (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(nfs_vi),
    .x_i    (td_x),
    .y_i    (td_y),
    .params (params),
    .valid_o(nfs_vo),
    .z_o    (nfs_z)
  );

  fitness_unit u_fit (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (fit_clr),
    .start(fit_start),
    .yd_i (yd_q),
    .z_i  (nfs_z),
    .busy (fit_busy),
    .done (fit_done),
    .en_o (en_new)
  );

  assign nfs_vi    = state == SMP_GO;
  assign fit_clr   = state == FIT_CLR;
  assign fit_start = state == SMP_NFS && nfs_vo;
  assign z_valid   = fit_start;
  assign z_index   = j;
  assign z_o       = nfs_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      i          <= '0;
      base       <= '0;
      k          <= '0;
      j          <= '0;
      yd_q       <= FP_ZERO;
      done       <= 1'b0;
      lb_updates <= '0;
      test_q     <= 1'b0;
      test_fitness <= FP_ZERO;
      for (int n = 0; n < D; n++) params[n] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          test_q <= test_mode;
          i     <= '0;
          base  <= '0;
          k     <= '0;
          state <= RD_P;
        end
        RD_P: begin
          // read issued for k < D; word k-1 arrives now
          if (k != 0) params[k-1] <= p_rdata;
          if (k == RAM_AW'(D)) state <= FIT_CLR;
          else                 k     <= k + 1'b1;
        end
        FIT_CLR: begin
          j     <= '0;
          state <= SMP_RD;
        end
        SMP_RD: state <= SMP_GO;
        SMP_GO: begin
          yd_q  <= td_yd;
          state <= SMP_NFS;
        end
        SMP_NFS: if (nfs_vo) state <= SMP_FIT;
        SMP_FIT: if (fit_done) begin
          if (j == RAM_AW'(SAMPLES - 1)) begin
            if (test_q) begin
              test_fitness <= en_new;
              done         <= 1'b1;
              state        <= IDLE;
            end else state <= EN_RD;
          end else begin
            j     <= j + 1'b1;
            state <= SMP_RD;
          end
        end
        EN_RD: state <= EN_CMP;
        EN_CMP: begin
          k <= '0;
          if (first_gen || fp_lt(en_new, en_rdata)) begin
            lb_updates <= lb_updates + 1;
            state      <= WR_PB;
          end else state <= (i == RAM_AW'(N - 1)) ? IDLE : RD_P;
          if (!(first_gen || fp_lt(en_new, en_rdata))) begin
            if (i == RAM_AW'(N - 1)) done <= 1'b1;
            i    <= i + 1'b1;
            base <= base + RAM_AW'(D);
          end
        end
        WR_PB: begin
          if (k == RAM_AW'(D - 1)) begin
            k    <= '0;
            i    <= i + 1'b1;
            base <= base + RAM_AW'(D);
            if (i == RAM_AW'(N - 1)) begin
              done  <= 1'b1;
              state <= IDLE;
            end else state <= RD_P;
          end else k <= k + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    p_req  = RAM_IDLE;
    pb_req = RAM_IDLE;
    en_req = RAM_IDLE;
    td_req = RAM_IDLE;
    unique case (state)
      RD_P:   if (k < RAM_AW'(D)) p_req = '{en: 1'b1, we: 1'b0, addr: base + k, wdata: FP_ZERO};
      SMP_RD: td_req = '{en: 1'b1, we: 1'b0, addr: j, wdata: FP_ZERO};
      EN_RD:  en_req = '{en: 1'b1, we: 1'b0, addr: i, wdata: FP_ZERO};
      EN_CMP: if (first_gen || fp_lt(en_new, en_rdata))
                en_req = '{en: 1'b1, we: 1'b1, addr: i, wdata: en_new};
      WR_PB:  pb_req = '{en: 1'b1, we: 1'b1, addr: base + k, wdata: params[k[4:0]]};
      default: ;
    endcase
  end

endmodule
