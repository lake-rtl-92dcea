// sram_sp: the tile's main Storage, a single-port SRAM with one MemoryPort.
//
// DEPTH words of WIDTH bits (256 x 64 = 2 KB by default). In a cycle with cen
// high it performs one access: a write of wdata to addr when wen is high, or a
// read of addr whose data appears on rdata after the next clock edge (1-cycle
// read) and stays there until the next read. Written as a plain array so that
// a synthesis flow may map it to a foundry macro of the same shape.
//
// Capacity, word width, single port and 1-cycle access follow the tile
// specification; the pin names and the read-data hold are this design's.
module sram_sp
  import lake_pkg::*;
#(
  parameter int unsigned DEPTH = SRAM_DEPTH,
  parameter int unsigned WIDTH = WIDE_W
) (
  input  logic                     clk,
  input  logic                     cen,
  input  logic                     wen,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cen) begin
      if (wen) mem[addr] <= wdata;
      else     rdata     <= mem[addr];
    end
  end

endmodule
