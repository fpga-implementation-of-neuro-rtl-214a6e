// nfs_pkg: shape of the neuro-fuzzy system (NFS), layout of a particle, the
// iPSO constants and the memory request type shared by the training stages.
//
// The NFS has two inputs, two Gaussian membership functions (MFs) per input
// and four rules, so a particle holds D = 20 parameters: a centre m and a
// width sigma for each of the four MFs, then p, q, r for each of the four
// rules. The order of the parameters inside a particle is this design's own
// choice. The iPSO constants (zeta = 0.76, alpha1 = alpha2 = 2.1,
// alpha3 = 2^-12, lambda limited to +/-2^-12) and the parameter limits
// (velocity [-1, 1], centres [-2.5, 2.5], widths [0.1, 2], rule parameters
// [-100, 100]) are the values the design was evaluated with.
package nfs_pkg;
  import fp32_pkg::*;

  // Which approximation of the Gaussian MF is built.
  typedef enum logic {
    MF_EQ9  = 1'b0,  // sigma-relative rational form, no multiplier
    MF_EQ10 = 1'b1   // sigma^2 / (sigma^2 + (x - m)^2)
  } mf_type_e;

  localparam int unsigned NUM_IN    = 2;
  localparam int unsigned NUM_MF    = 2;               // MFs per input
  localparam int unsigned NUM_RULES = 4;
  localparam int unsigned NUM_PARAM = 2 * NUM_IN * NUM_MF + 3 * NUM_RULES;  // D = 20

  // Index of each parameter inside a particle.
  // MF k (k = 0: A1, 1: A2, 2: B1, 3: B2): centre at 2k, width at 2k+1.
  // Rule i (0..3): p at 8+3i, q at 9+3i, r at 10+3i.
  localparam int unsigned IDX_RULE0 = 2 * NUM_IN * NUM_MF;  // 8

  typedef fp32_t param_vec_t [NUM_PARAM];

  // iPSO constants.
  localparam fp32_t ZETA      = 32'h3F42_8F5C;  // 0.76
  localparam fp32_t ALPHA1    = 32'h4006_6666;  // 2.1
  localparam fp32_t ALPHA2    = 32'h4006_6666;  // 2.1
  localparam fp32_t ALPHA3    = 32'h3980_0000;  // 2^-12
  localparam fp32_t LAMBDA_HI = 32'h3980_0000;  // 2^-12
  localparam fp32_t LAMBDA_LO = 32'hB980_0000;  // -2^-12

  // Limits of the restriction blocks.
  localparam fp32_t VEL_HI    = 32'h3F80_0000;  //  1.0
  localparam fp32_t VEL_LO    = 32'hBF80_0000;  // -1.0
  localparam fp32_t CENTRE_HI = 32'h4020_0000;  //  2.5
  localparam fp32_t CENTRE_LO = 32'hC020_0000;  // -2.5
  localparam fp32_t SIGMA_HI  = 32'h4000_0000;  //  2.0
  localparam fp32_t SIGMA_LO  = 32'h3DCC_CCCD;  //  0.1
  localparam fp32_t RULE_HI   = 32'h42C8_0000;  //  100
  localparam fp32_t RULE_LO   = 32'hC2C8_0000;  // -100

  // Lower and upper limit of parameter k of a particle.
  function automatic fp32_t param_lo(int unsigned k);
    if (k >= IDX_RULE0) return RULE_LO;
    return k[0] ? SIGMA_LO : CENTRE_LO;
  endfunction

  function automatic fp32_t param_hi(int unsigned k);
    if (k >= IDX_RULE0) return RULE_HI;
    return k[0] ? SIGMA_HI : CENTRE_HI;
  endfunction

  // One request to a single-port RAM; read data returns one cycle later.
  localparam int unsigned RAM_AW = 16;
  typedef struct packed {
    logic              en;
    logic              we;
    logic [RAM_AW-1:0] addr;
    fp32_t             wdata;
  } ram_req_t;

  localparam ram_req_t RAM_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

endpackage
