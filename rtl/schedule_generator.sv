// schedule_generator: statically scheduled access events of a port.
//
// The schedule of a unified-buffer port is an affine sequence of cycle
// timestamps, offset + sum_i stride_i * iter_i. Like the address generator
// this block keeps the current timestamp (sched) in a register, loads
// cfg_offset on restart and adds the delta of the incrementing dimension on
// each event. An event (fire) is raised combinationally in the cycle in which
// the tile cycle counter equals sched while the controller is active. fire is
// also the step of the controller's iteration domain and address generators.
//
// Timestamps as the scheduling mechanism follow the unified-buffer model; the equality
// compare against a free-running 16-bit cycle counter is this design's choice.
module schedule_generator
  import lake_pkg::*;
#(
  parameter int unsigned ND = DIM,
  parameter int unsigned CW = CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  logic                  active,
  input  logic [CW-1:0]         cycle,
  input  logic [DIM_W-1:0]      inc_dim,
  input  logic [CW-1:0]         cfg_offset,
  input  logic [ND-1:0][CW-1:0] cfg_delta,
  output logic                  fire,
  output logic [CW-1:0]         sched
);

  assign fire = active && !restart && (cycle == sched);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sched <= '0;
    else if (restart) sched <= cfg_offset;
    else if (fire)    sched <= sched + cfg_delta[inc_dim];
  end

endmodule
