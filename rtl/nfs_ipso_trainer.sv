// nfs_ipso_trainer: a neuro-fuzzy system trained on chip by improved particle
// swarm optimisation (iPSO), in IEEE-754 single precision.
//
// A swarm of N particles, each a full parameter set (D = 20 numbers: MF
// centres and widths, rule parameters) of a 2-input, 4-rule Sugeno
// neuro-fuzzy network, is kept in block RAMs: P (particles), Pbest (local
// bests), Vm (velocities), En (local best fitness) and gbest (global best).
// Training runs in four stages:
//   1  pso_init         random initial P = Pbest and Vm
//   2  pso_local_best   every particle's fitness over the training set,
//                       local best update
//   3  pso_global_best  the best local best becomes gbest
//   4  pso_update       velocity and position update with restriction
// Stages 2-3-4 repeat G_MAX times; then `done` rises. The iteration counter
// is advanced after stage 4 and stage 2 follows while it is below G_MAX.
//
// Interface: while idle, the host writes the training set (x, y, desired
// output yd) through td_we/td_addr, then pulses `start`. After `done` it
// reads the trained parameter vector through gb_raddr/gb_rdata (one clock of
// read latency) and the final fitness on gb_fitness. To test a trained
// network the host loads a test set into the same sample RAMs and pulses
// `test_start`: the network is built from gbest, run over the samples and the
// test fitness appears on `test_fitness` when `done` rises again. Every
// network output, in training and in test, is shown on nfs_z_valid/nfs_z. The mechanism counters
// (local best updates, velocity and position restrictions) are brought out
// for observation.
//
// Beside the trainer sits the front end of the licence-plate application,
// plate_feature_extractor: a grey image written through img_* is reduced to
// edge features (mean and variance of its thresholded vertical-edge image)
// that the host can use as network inputs. It has its own ports and shares
// nothing with the trainer. The stage order, RAM set and constants follow the source
// design; the host interface and the RAM sharing are this implementation's.
module nfs_ipso_trainer
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter int unsigned N       = 100,   // swarm size
  parameter int unsigned SAMPLES = 100,   // training samples
  parameter int unsigned G_MAX   = 1000,  // generations
  parameter mf_type_e    MF_TYPE = MF_EQ9,
  parameter int unsigned IMG_W   = 128,   // candidate region width (pixels)
  parameter int unsigned IMG_H   = 32,    // candidate region height
  parameter int unsigned THRESH  = 128    // edge threshold on |Gx|
) (
  input  logic              clk,
  input  logic              rst_n,
  // training set load
  input  logic              td_we,
  input  logic [RAM_AW-1:0] td_addr,
  input  fp32_t             td_x,
  input  fp32_t             td_y,
  input  fp32_t             td_yd,
  // control
  input  logic              start,
  input  logic              test_start,
  output logic              busy,
  output logic              done,
  output logic [1:0]        stage,        // 0 stage 1, 1 stage 2, 2 stage 3, 3 stage 4
  output logic [31:0]       iteration,
  // result
  input  logic [RAM_AW-1:0] gb_raddr,
  output fp32_t             gb_rdata,
  output fp32_t             gb_fitness,
  output logic [RAM_AW-1:0] gb_index,
  output fp32_t             test_fitness,
  output logic              nfs_z_valid,
  output logic [RAM_AW-1:0] nfs_z_index,
  output fp32_t             nfs_z,
  // mechanism counters
  output logic [31:0]       lb_updates,
  output logic [31:0]       vel_clips,
  output logic [31:0]       pos_clips,
  // licence-plate feature front end
  input  logic              img_we,
  input  logic [15:0]       img_addr,
  input  logic [7:0]        img_data,
  input  logic              fe_start,
  output logic              fe_busy,
  output logic              fe_done,
  output logic [31:0]       fe_edge_count,
  output fp32_t             fe_mean,
  output fp32_t             fe_variance
);

  plate_feature_extractor #(.IMG_W(IMG_W), .IMG_H(IMG_H), .THRESH(THRESH)) u_features (
    .clk(clk), .rst_n(rst_n), .img_we(img_we), .img_addr(img_addr), .img_data(img_data),
    .start(fe_start), .busy(fe_busy), .done(fe_done), .edge_count(fe_edge_count),
    .mean_o(fe_mean), .var_o(fe_variance));

  localparam int unsigned D = NUM_PARAM;

  typedef enum logic [2:0] {T_IDLE, T_INIT, T_LOCAL, T_GLOBAL, T_UPDATE, T_TEST, T_DONE} tstate_e;
  tstate_e tstate;
  logic    go1, go2, go3, go4;
  logic    done1, done2, done3, done4;

  // ---------------- random numbers
  fp32_t rnd_init, rnd_r1, rnd_r2, rnd_lambda;
  logic  step_init, step_upd;
  logic [31:0] raw_init, raw_r1, raw_r2;

  lcg_rng #(.SEED(32'h2545_F491)) u_rng_init (
    .clk(clk), .rst_n(rst_n), .step(step_init), .raw(raw_init), .uniform(rnd_init));
  lcg_rng #(.SEED(32'h6C07_8965)) u_rng_r1 (
    .clk(clk), .rst_n(rst_n), .step(step_upd), .raw(raw_r1), .uniform(rnd_r1));
  lcg_rng #(.SEED(32'h5851_F42D)) u_rng_r2 (
    .clk(clk), .rst_n(rst_n), .step(step_upd), .raw(raw_r2), .uniform(rnd_r2));
  normal_rng u_rng_lambda (
    .clk(clk), .rst_n(rst_n), .step(step_upd), .value(rnd_lambda));

  // ---------------- RAMs
  ram_req_t p_req, pb_req, vm_req, en_req, gb_req, td_req;
  fp32_t    p_rd, pb_rd, vm_rd, en_rd, gb_rd, tdx_rd, tdy_rd, tdyd_rd;

  bram #(.DEPTH(N * D), .AW(RAM_AW)) u_p_ram (
    .clk(clk), .en(p_req.en), .we(p_req.we), .addr(p_req.addr), .wdata(p_req.wdata), .rdata(p_rd));
  bram #(.DEPTH(N * D), .AW(RAM_AW)) u_pbest_ram (
    .clk(clk), .en(pb_req.en), .we(pb_req.we), .addr(pb_req.addr), .wdata(pb_req.wdata), .rdata(pb_rd));
  bram #(.DEPTH(N * D), .AW(RAM_AW)) u_vm_ram (
    .clk(clk), .en(vm_req.en), .we(vm_req.we), .addr(vm_req.addr), .wdata(vm_req.wdata), .rdata(vm_rd));
  bram #(.DEPTH(N), .AW(RAM_AW)) u_en_ram (
    .clk(clk), .en(en_req.en), .we(en_req.we), .addr(en_req.addr), .wdata(en_req.wdata), .rdata(en_rd));
  bram #(.DEPTH(D), .AW(RAM_AW)) u_gbest_ram (
    .clk(clk), .en(gb_req.en), .we(gb_req.we), .addr(gb_req.addr), .wdata(gb_req.wdata), .rdata(gb_rd));
  bram #(.DEPTH(SAMPLES), .AW(RAM_AW)) u_tdx_ram (
    .clk(clk), .en(td_req.en), .we(td_req.we), .addr(td_req.addr), .wdata(td_x), .rdata(tdx_rd));
  bram #(.DEPTH(SAMPLES), .AW(RAM_AW)) u_tdy_ram (
    .clk(clk), .en(td_req.en), .we(td_req.we), .addr(td_req.addr), .wdata(td_y), .rdata(tdy_rd));
  bram #(.DEPTH(SAMPLES), .AW(RAM_AW)) u_tdyd_ram (
    .clk(clk), .en(td_req.en), .we(td_req.we), .addr(td_req.addr), .wdata(td_yd), .rdata(tdyd_rd));

  assign gb_rdata = gb_rd;

  // ---------------- stages
  ram_req_t s1_p, s1_pb, s1_vm;
  logic [1:0] out_flg;
  pso_init #(.N(N)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .start(go1), .rand_i(rnd_init), .rand_step(step_init),
    .p_req(s1_p), .pb_req(s1_pb), .vm_req(s1_vm), .out_flg(out_flg), .done(done1));

  ram_req_t s2_p, s2_pb, s2_en, s2_td;
  pso_local_best #(.N(N), .SAMPLES(SAMPLES), .MF_TYPE(MF_TYPE)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .start(go2), .first_gen(iteration == 0),
    .test_mode(tstate == T_TEST),
    .p_req(s2_p), .p_rdata(tstate == T_TEST ? gb_rd : p_rd), .pb_req(s2_pb), .en_req(s2_en), .en_rdata(en_rd),
    .td_req(s2_td), .td_x(tdx_rd), .td_y(tdy_rd), .td_yd(tdyd_rd),
    .done(done2), .lb_updates(lb_updates), .test_fitness(test_fitness),
    .z_valid(nfs_z_valid), .z_index(nfs_z_index), .z_o(nfs_z));

  ram_req_t s3_en, s3_pb, s3_gb;
  pso_global_best #(.N(N)) u_stage3 (
    .clk(clk), .rst_n(rst_n), .start(go3),
    .en_req(s3_en), .en_rdata(en_rd), .pb_req(s3_pb), .pb_rdata(pb_rd), .gb_req(s3_gb),
    .gb_fitness(gb_fitness), .gb_index(gb_index), .done(done3));

  ram_req_t s4_p, s4_pb, s4_vm, s4_gb;
  pso_update #(.N(N)) u_stage4 (
    .clk(clk), .rst_n(rst_n), .start(go4),
    .r1_i(rnd_r1), .r2_i(rnd_r2), .lambda_i(rnd_lambda), .rand_step(step_upd),
    .p_req(s4_p), .p_rdata(p_rd), .pb_req(s4_pb), .pb_rdata(pb_rd),
    .vm_req(s4_vm), .vm_rdata(vm_rd), .gb_req(s4_gb), .gb_rdata(gb_rd),
    .done(done4), .vel_clips(vel_clips), .pos_clips(pos_clips));

  // ---------------- RAM sharing: the running stage owns the RAMs
  always_comb begin
    p_req  = RAM_IDLE;
    pb_req = RAM_IDLE;
    vm_req = RAM_IDLE;
    en_req = RAM_IDLE;
    gb_req = RAM_IDLE;
    td_req = RAM_IDLE;
    unique case (tstate)
      T_INIT: begin
        p_req  = s1_p;
        pb_req = s1_pb;
        vm_req = s1_vm;
      end
      T_LOCAL: begin
        p_req  = s2_p;
        pb_req = s2_pb;
        en_req = s2_en;
        td_req = s2_td;
      end
      T_GLOBAL: begin
        en_req = s3_en;
        pb_req = s3_pb;
        gb_req = s3_gb;
      end
      T_TEST: begin
        gb_req = s2_p;
        td_req = s2_td;
      end
      T_UPDATE: begin
        p_req  = s4_p;
        pb_req = s4_pb;
        vm_req = s4_vm;
        gb_req = s4_gb;
      end
      default: begin
        // idle: host loads training data and reads the global best
        td_req = '{en: td_we, we: td_we, addr: td_addr, wdata: FP_ZERO};
        gb_req = '{en: 1'b1, we: 1'b0, addr: gb_raddr, wdata: FP_ZERO};
      end
    endcase
  end

  // ---------------- stage sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate    <= T_IDLE;
      iteration <= '0;
      {go1, go2, go3, go4} <= '0;
    end else begin
      {go1, go2, go3, go4} <= '0;
      unique case (tstate)
        T_IDLE, T_DONE: if (start) begin
          iteration <= '0;
          go1       <= 1'b1;
          tstate    <= T_INIT;
        end else if (test_start) begin
          go2       <= 1'b1;
          tstate    <= T_TEST;
        end
        T_TEST: if (done2 && !go2) tstate <= T_DONE;
        T_INIT: if (done1 && !go1) begin
          go2    <= 1'b1;
          tstate <= T_LOCAL;
        end
        T_LOCAL: if (done2) begin
          go3    <= 1'b1;
          tstate <= T_GLOBAL;
        end
        T_GLOBAL: if (done3) begin
          go4    <= 1'b1;
          tstate <= T_UPDATE;
        end
        T_UPDATE: if (done4) begin
          iteration <= iteration + 1;
          if (iteration + 1 < G_MAX) begin
            go2    <= 1'b1;
            tstate <= T_LOCAL;
          end else tstate <= T_DONE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (tstate)
      T_LOCAL:  stage = 2'd1;
      T_GLOBAL: stage = 2'd2;
      T_UPDATE: stage = 2'd3;
      default:  stage = 2'd0;
    endcase
  end

  assign busy = tstate != T_IDLE && tstate != T_DONE;
  assign done = tstate == T_DONE;

endmodule
