// pso_init: stage 1 of training, the random initial swarm.
//
// A memory controller walks two phases, signalled on `out_flg`:
//   2'b01  SET_P_RAM   one random number per clock is written to the same
//                      address of P_RAM and Pbest_RAM (the local bests start
//                      equal to the particles), for all N*D entries;
//   2'b10  SET_Vm_RAM  one random number per clock is written to Vm_RAM;
//   2'b00  DONE        `done` is high until the next `start`.
// Random numbers come from an external generator: `rand_i` is the current
// value in [0, 1] and `rand_step` asks for the next one in the same clock as
// it is used. The phase order and the shared write of P and Pbest follow the
// source design; the handshake is this implementation's own. Takes
// 2*N*D + 1 clocks from `start` to `done`.
module pso_init
  import fp32_pkg::*;
  import nfs_pkg::*;
#(
  parameter int unsigned N = 100,          // swarm size
  parameter int unsigned D = NUM_PARAM     // parameters per particle
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  fp32_t    rand_i,
  output logic     rand_step,
  output ram_req_t p_req,
  output ram_req_t pb_req,
  output ram_req_t vm_req,
  output logic [1:0] out_flg,
  output logic     done
);

  localparam int unsigned LEN = N * D;

  typedef enum logic [1:0] {IDLE, SET_P_RAM, SET_VM_RAM, DONE} state_e;
  state_e state;
  logic [RAM_AW-1:0] n_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      n_i   <= '0;
    end else begin
      unique case (state)
        IDLE, DONE: if (start) begin
          state <= SET_P_RAM;
          n_i   <= '0;
        end
        SET_P_RAM: begin
          if (n_i == RAM_AW'(LEN - 1)) begin
            n_i   <= '0;
            state <= SET_VM_RAM;
          end else n_i <= n_i + 1'b1;
        end
        SET_VM_RAM: begin
          if (n_i == RAM_AW'(LEN - 1)) begin
            n_i   <= '0;
            state <= DONE;
          end else n_i <= n_i + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    p_req   = RAM_IDLE;
    pb_req  = RAM_IDLE;
    vm_req  = RAM_IDLE;
    out_flg = 2'b00;
    rand_step = 1'b0;
    if (state == SET_P_RAM) begin
      out_flg   = 2'b01;
      rand_step = 1'b1;
      p_req     = '{en: 1'b1, we: 1'b1, addr: n_i, wdata: rand_i};
      pb_req    = p_req;
    end else if (state == SET_VM_RAM) begin
      out_flg   = 2'b10;
      rand_step = 1'b1;
      vm_req    = '{en: 1'b1, we: 1'b1, addr: n_i, wdata: rand_i};
    end
  end

  assign done = state == DONE;

endmodule
