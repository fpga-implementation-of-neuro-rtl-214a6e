// pso_global_best: stage 3 of training, choice of the global best particle.
//
// After stage 2 the fitness vector En holds the fitness of every local best.
// This block reads En_RAM[0..N-1] (one word per clock), keeps the index of the
// smallest value, then copies that row of Pbest_RAM into the gbest RAM (one
// word per clock, read and write overlapped by one clock). `gb_fitness` and
// `gb_index` hold the chosen fitness and particle; `done` pulses at the end.
// Ties keep the lower index. Takes N + D + 3 clocks. The selection rule is the
// source design's; the sequential scan is this implementation's choice.
module pso_global_best
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter int unsigned N = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output ram_req_t          en_req,
  input  fp32_t             en_rdata,
  output ram_req_t          pb_req,
  input  fp32_t             pb_rdata,
  output ram_req_t          gb_req,
  output fp32_t             gb_fitness,
  output logic [RAM_AW-1:0] gb_index,
  output logic              done
);

  localparam int unsigned D = NUM_PARAM;

  typedef enum logic [1:0] {IDLE, SCAN, COPY} state_e;
  state_e state;

  logic [RAM_AW-1:0] c, cbase, bbase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      c          <= '0;
      cbase      <= '0;
      bbase      <= '0;
      gb_fitness <= FP_MAX;
      gb_index   <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          c     <= '0;
          cbase <= '0;
          state <= SCAN;
        end
        SCAN: begin
          // word c-1 of En arrives now
          if (c != 0) begin
            if (c == 1 || fp_lt(en_rdata, gb_fitness)) begin
              gb_fitness <= en_rdata;
              gb_index   <= c - 1'b1;
              bbase      <= cbase - RAM_AW'(D);
            end
          end
          cbase <= cbase + RAM_AW'(D);
          if (c == RAM_AW'(N)) begin
            c     <= '0;
            state <= COPY;
          end else c <= c + 1'b1;
        end
        COPY: begin
          if (c == RAM_AW'(D)) begin
            done  <= 1'b1;
            state <= IDLE;
          end else c <= c + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    en_req = RAM_IDLE;
    pb_req = RAM_IDLE;
    gb_req = RAM_IDLE;
    if (state == SCAN && c < RAM_AW'(N))
      en_req = '{en: 1'b1, we: 1'b0, addr: c, wdata: FP_ZERO};
    if (state == COPY) begin
      if (c < RAM_AW'(D))
        pb_req = '{en: 1'b1, we: 1'b0, addr: bbase + c, wdata: FP_ZERO};
      if (c != 0)
        gb_req = '{en: 1'b1, we: 1'b1, addr: c - 1'b1, wdata: pb_rdata};
    end
  end

endmodule
