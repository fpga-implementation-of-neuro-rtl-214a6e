// fitness_unit: sum-of-squared-error fitness of one particle.
//
//   En = 1/2 * sum_j (yd_j - z_j)^2
// `clr` sets En to zero before the first sample of a particle. Each `start`
// takes a desired output yd and the network output z and adds half of the
// squared error to En through one shared floating-point unit (fp_unit), in the
// three steps of the source design: error, squared error, accumulation (the
// halving is an exponent decrement on the way into the adder). `done` pulses
// five clocks after `start`, when `en_o` holds the new sum; `start` is ignored
// while `busy`.
module fitness_unit
  import fp32_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  start,
  input  fp32_t yd_i,
  input  fp32_t z_i,
  output logic  busy,
  output logic  done,
  output fp32_t en_o
);

  typedef enum logic [2:0] {IDLE, CALC_ERROR, SQUARE_ERROR, FITNESS_VALUE, ACCUMULATE} state_e;
  state_e state;

  fp32_t yd_q, z_q;
  logic       u_valid;
  logic [2:0] u_op;
  fp32_t      u_a, u_b, u_y;
  logic       u_vo;

  fp_unit u_fp (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(u_valid),
    .op_i   (u_op),
    .a_i    (u_a),
    .b_i    (u_b),
    .valid_o(u_vo),
    .y_o    (u_y)
  );

  always_comb begin
    u_valid = 1'b1;
    u_op    = 3'd0;
    u_a     = FP_ZERO;
    u_b     = FP_ZERO;
    unique case (state)
      CALC_ERROR:    begin u_op = 3'd1; u_a = yd_q; u_b = z_q;            end
      SQUARE_ERROR:  begin u_op = 3'd2; u_a = u_y;  u_b = u_y;            end
      FITNESS_VALUE: begin u_op = 3'd0; u_a = en_o; u_b = fp_half(u_y);   end
      default:       u_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      en_o  <= FP_ZERO;
      yd_q  <= FP_ZERO;
      z_q   <= FP_ZERO;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (clr) en_o <= FP_ZERO;
          if (start) begin
            yd_q  <= yd_i;
            z_q   <= z_i;
            state <= CALC_ERROR;
          end
        end
        CALC_ERROR:    state <= SQUARE_ERROR;
        SQUARE_ERROR:  state <= FITNESS_VALUE;
        FITNESS_VALUE: state <= ACCUMULATE;
        ACCUMULATE: begin
          en_o  <= u_y;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = state != IDLE;

endmodule
