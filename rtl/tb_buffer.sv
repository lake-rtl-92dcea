// tb_buffer: output-side vectorization (transpose) buffer of a port.
//
// Receives whole wide words read from the SRAM into one of VEC_SLOTS slots
// and serves them as narrow words: narrow word a is slot a / VEC, lane a % VEC,
// lane 0 in the low bits. A wide write lands on the next clock edge (1-cycle
// write); the narrow read is combinational (0-cycle read). With two slots the
// next SRAM word can arrive while the previous one is still being emitted.
//
// Vectorization factor, 16 B capacity and the delays follow the tile
// specification; lane ordering is this design's choice.
module tb_buffer
  import lake_pkg::*;
#(
  parameter int unsigned V     = VEC,
  parameter int unsigned SLOTS = VEC_SLOTS,
  parameter int unsigned DW    = DATA_W
) (
  input  logic                             clk,
  input  logic                             wr_en,
  input  logic [(SLOTS>1 ? $clog2(SLOTS) : 1)-1:0] wr_slot,
  input  logic [V*DW-1:0]                  wr_data,
  input  logic [$clog2(V*SLOTS)-1:0]       rd_addr,
  output logic [DW-1:0]                    rd_data
);

  localparam int unsigned LW = $clog2(V);

  logic [SLOTS-1:0][V-1:0][DW-1:0] mem;

  always_ff @(posedge clk)
    if (wr_en) mem[wr_slot] <= wr_data;

  assign rd_data = mem[rd_addr >> LW][rd_addr[LW-1:0]];

endmodule
