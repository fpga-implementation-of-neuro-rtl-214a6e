// fp_restrict: the "Restriction" block of the swarm update.
//
// Limits a single precision value to the interval [lo, hi]: a value above hi
// becomes hi, one below lo becomes lo, any other passes unchanged. It is
// combinational. The source restricts velocities to [-1, 1] and particle
// elements to per-parameter intervals; a general [lo, hi] form is used here
// so that the asymmetric width interval [0.1, 2] is covered by the same block.
// `clipped` tells that a limit was applied.
module fp_restrict
  import fp32_pkg::*;
(
  input  fp32_t value,
  input  fp32_t lo,
  input  fp32_t hi,
  output fp32_t result,
  output logic  clipped
);

  always_comb begin
    result  = fp_clamp(value, lo, hi);
    clipped = result != value;
  end

endmodule
