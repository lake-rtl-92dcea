// agg_buffer: input-side vectorization (aggregation) buffer of a port.
//
// Packs VEC narrow words into one wide SRAM word. It holds VEC_SLOTS wide
// slots (2 x 64 bit = 16 bytes by default) addressed in narrow words: narrow
// word a lives in slot a / VEC, lane a % VEC, lane 0 in the low bits. A narrow
// write lands on the next clock edge (1-cycle write); the wide read of a whole
// slot is combinational (0-cycle read), so a slot may be moved to the SRAM in
// the cycle after its last word was written. With two slots one can fill
// while the other drains.
//
// Vectorization factor, 16 B capacity and the 1-cycle write / 0-cycle read
// delays follow the tile specification; lane ordering is this design's choice.
module agg_buffer
  import lake_pkg::*;
#(
  parameter int unsigned V     = VEC,
  parameter int unsigned SLOTS = VEC_SLOTS,
  parameter int unsigned DW    = DATA_W
) (
  input  logic                             clk,
  input  logic                             wr_en,
  input  logic [$clog2(V*SLOTS)-1:0]       wr_addr,
  input  logic [DW-1:0]                    wr_data,
  input  logic [(SLOTS>1 ? $clog2(SLOTS) : 1)-1:0] rd_slot,
  output logic [V*DW-1:0]                  rd_data
);

  localparam int unsigned LW = $clog2(V);

  logic [SLOTS-1:0][V-1:0][DW-1:0] mem;

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr >> LW][wr_addr[LW-1:0]] <= wr_data;

  assign rd_data = mem[rd_slot];

endmodule
