// address_generator: affine address sequence of a port, computed incrementally.
//
// The access map of a unified-buffer port is offset + sum_i stride_i * iter_i.
// Rather than multiply, this generator keeps the current address in a
// register, loads cfg_offset on restart, and on every step adds the delta of
// the dimension that increments (inc_dim, from the iteration domain). The
// deltas are the strides transformed by lake_pkg::to_delta. addr is the
// address of the current point; it changes on the clock edge that samples
// step. Addresses are CW bits wide and wrap; users take the low bits they
// need, which makes circular buffers free.
//
// The affine access map and its strides/offset follow the unified-buffer
// model; the incremental form is this design's implementation choice.
module address_generator
  import lake_pkg::*;
#(
  parameter int unsigned ND = DIM,
  parameter int unsigned CW = CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  logic                  step,
  input  logic [DIM_W-1:0]      inc_dim,
  input  logic [CW-1:0]         cfg_offset,
  input  logic [ND-1:0][CW-1:0] cfg_delta,
  output logic [CW-1:0]         addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr <= '0;
    else if (restart) addr <= cfg_offset;
    else if (step)    addr <= addr + cfg_delta[inc_dim];
  end

endmodule
