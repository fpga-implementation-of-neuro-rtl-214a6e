// bram: synchronous single-port RAM, the storage of the swarm.
//
// The trainer keeps the swarm P, the local bests Pbest, the velocities Vm,
// the fitness values En and the global best gbest each in a RAM of its own,
// one 32-bit word (the width of the number format) per entry, so that all of
// them can be read at the same instant. Read data appears one clock after
// `en` with `we` low; a write stores `wdata` at `addr`. Contents are not reset
// (the initialisation stage writes them). Width and depth are parameters.
module bram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2000,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
