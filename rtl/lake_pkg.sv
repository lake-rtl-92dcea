// lake_pkg: sizes, configuration types and the configuration transformation
// shared by every module of the unified-buffer memory tile.
//
// The tile follows a Lake-style specification of a CGRA memory tile: two
// 16-bit input ports and two 16-bit output ports that timeshare one 64-bit
// single-port SRAM of 2 KB, each port with a 4:1 vectorization buffer of
// 16 bytes, and every port side driven by a 6-dimensional sequencing
// controller. Those numbers come from the tile's published specification.
// The 16-bit counter/timestamp width and the configuration layout are this
// design's own choices.
//
// Address and schedule generators are incremental: instead of multiplying
// strides by loop indices they add one per-dimension delta per step. The
// compiler hands out affine strides, so to_delta() converts a stride vector
// into the delta vector the hardware wants:
//   delta[d] = stride[d] - sum_{j<d} stride[j] * (extent[j] - 1)
// i.e. the jump when dimension d increments and every inner dimension wraps.
package lake_pkg;

  localparam int DIM        = 6;    // sequencing-controller dimensionality
  localparam int CNT_W      = 16;   // loop counter, address and timestamp width
  localparam int DIM_W      = 3;    // enough bits to hold 0..DIM
  localparam int DATA_W     = 16;   // narrow (external) word
  localparam int VEC        = 4;    // vectorization factor
  localparam int WIDE_W     = DATA_W * VEC;  // 64-bit SRAM word
  localparam int VEC_SLOTS  = 2;    // 16 B of vectorization buffering = 2 wide words
  localparam int VEC_AW     = $clog2(VEC * VEC_SLOTS);  // narrow address into a vec buffer
  localparam int SLOT_AW    = (VEC_SLOTS > 1) ? $clog2(VEC_SLOTS) : 1;
  localparam int SRAM_BYTES = 2048;
  localparam int SRAM_DEPTH = SRAM_BYTES / (WIDE_W / 8);  // 256 words
  localparam int SRAM_AW    = $clog2(SRAM_DEPTH);
  localparam int NUM_IN     = 2;
  localparam int NUM_OUT    = 2;
  localparam int NUM_CTRL   = 2 * (NUM_IN + NUM_OUT);  // narrow + wide side per port

  // Timing the compiler has to respect (the tile's "compiler collateral").
  localparam int SRAM_RD_LAT = 1;   // SRAM read data one cycle after the request
  localparam int VEC_WR_LAT  = 1;   // vectorization buffer write visible next cycle
  localparam int VEC_RD_LAT  = 0;   // vectorization buffer read is combinational

  typedef logic [CNT_W-1:0] word_t;
  typedef word_t            vec_t [DIM];

  // Configuration of one sequencing controller (already transformed to deltas).
  typedef struct packed {
    logic [DIM_W-1:0]           dim;          // active dimensions, 0 = controller off
    logic [DIM-1:0][CNT_W-1:0]  extent;       // iterations per dimension (>= 1)
    logic [DIM-1:0][CNT_W-1:0]  sched_delta;  // timestamp increments
    logic [CNT_W-1:0]           sched_offset; // first timestamp
    logic [DIM-1:0][CNT_W-1:0]  addr_delta;   // address increments, generator 0
    logic [CNT_W-1:0]           addr_offset;  // first address, generator 0
    logic [DIM-1:0][CNT_W-1:0]  addr2_delta;  // address increments, generator 1
    logic [CNT_W-1:0]           addr2_offset; // first address, generator 1
  } ctrl_cfg_t;

  // Register map of one controller inside config_regs (word index).
  localparam int REG_DIM          = 0;
  localparam int REG_EXTENT       = 1;   // 1..6
  localparam int REG_SCHED_DELTA  = 7;   // 7..12
  localparam int REG_SCHED_OFFSET = 13;
  localparam int REG_ADDR_DELTA   = 14;  // 14..19
  localparam int REG_ADDR_OFFSET  = 20;
  localparam int REG_ADDR2_DELTA  = 21;  // 21..26
  localparam int REG_ADDR2_OFFSET = 27;
  localparam int REGS_PER_CTRL    = 32;
  localparam int CFG_AW           = $clog2(NUM_CTRL * REGS_PER_CTRL);

  // Controller numbering inside the tile.
  function automatic int ctrl_in_narrow(int p);  return 2 * p;                  endfunction
  function automatic int ctrl_in_wide(int p);    return 2 * p + 1;              endfunction
  function automatic int ctrl_out_wide(int p);   return 2 * NUM_IN + 2 * p;     endfunction
  function automatic int ctrl_out_narrow(int p); return 2 * NUM_IN + 2 * p + 1; endfunction

  // Configuration transformation: affine strides -> incremental deltas.
  function automatic logic [DIM-1:0][CNT_W-1:0] to_delta(
      input logic [DIM-1:0][CNT_W-1:0] stride,
      input logic [DIM-1:0][CNT_W-1:0] extent);
    logic [DIM-1:0][CNT_W-1:0] d;
    logic [CNT_W-1:0] span;
    span = '0;
    for (int i = 0; i < DIM; i++) begin
      d[i] = stride[i] - span;
      span = span + stride[i] * (extent[i] - CNT_W'(1));
    end
    return d;
  endfunction

endpackage
