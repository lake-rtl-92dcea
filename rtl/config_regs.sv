// config_regs: configuration registers of the tile's sequencing controllers.
//
// Holds one ctrl_cfg_t per controller. A write (cfg_wr high) stores cfg_wdata
// into word cfg_addr on the next clock edge; cfg_rdata returns the addressed
// word combinationally. cfg_addr = controller * 32 + field, with the field
// numbers of lake_pkg (REG_DIM, REG_EXTENT+d, REG_SCHED_DELTA+d, ...); unused
// words read as zero. Reset clears every register, which leaves every
// controller off (dim = 0). Values are written already transformed to deltas
// (lake_pkg::to_delta).
//
// That the controllers are programmed through configuration registers is
// part of the tile specification; the bus and register map are this
// design's.
module config_regs
  import lake_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_wr,
  input  logic [CFG_AW-1:0]     cfg_addr,
  input  logic [CNT_W-1:0]      cfg_wdata,
  output logic [CNT_W-1:0]      cfg_rdata,
  output ctrl_cfg_t             ctrl_cfg [NUM_CTRL]
);

  localparam int FW = $clog2(REGS_PER_CTRL);

  logic [CFG_AW-FW-1:0] sel;
  logic [FW-1:0]        fld;

  assign sel = cfg_addr[CFG_AW-1:FW];
  assign fld = cfg_addr[FW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CTRL; c++) ctrl_cfg[c] <= '0;
    end else if (cfg_wr) begin
      for (int d = 0; d < DIM; d++) begin
        if (int'(fld) == REG_EXTENT + d)      ctrl_cfg[sel].extent[d]      <= cfg_wdata;
        if (int'(fld) == REG_SCHED_DELTA + d) ctrl_cfg[sel].sched_delta[d] <= cfg_wdata;
        if (int'(fld) == REG_ADDR_DELTA + d)  ctrl_cfg[sel].addr_delta[d]  <= cfg_wdata;
        if (int'(fld) == REG_ADDR2_DELTA + d) ctrl_cfg[sel].addr2_delta[d] <= cfg_wdata;
      end
      if (int'(fld) == REG_DIM)          ctrl_cfg[sel].dim          <= cfg_wdata[DIM_W-1:0];
      if (int'(fld) == REG_SCHED_OFFSET) ctrl_cfg[sel].sched_offset <= cfg_wdata;
      if (int'(fld) == REG_ADDR_OFFSET)  ctrl_cfg[sel].addr_offset  <= cfg_wdata;
      if (int'(fld) == REG_ADDR2_OFFSET) ctrl_cfg[sel].addr2_offset <= cfg_wdata;
    end
  end

  always_comb begin
    cfg_rdata = '0;
    for (int d = 0; d < DIM; d++) begin
      if (int'(fld) == REG_EXTENT + d)      cfg_rdata = ctrl_cfg[sel].extent[d];
      if (int'(fld) == REG_SCHED_DELTA + d) cfg_rdata = ctrl_cfg[sel].sched_delta[d];
      if (int'(fld) == REG_ADDR_DELTA + d)  cfg_rdata = ctrl_cfg[sel].addr_delta[d];
      if (int'(fld) == REG_ADDR2_DELTA + d) cfg_rdata = ctrl_cfg[sel].addr2_delta[d];
    end
    if (int'(fld) == REG_DIM)          cfg_rdata = CNT_W'(ctrl_cfg[sel].dim);
    if (int'(fld) == REG_SCHED_OFFSET) cfg_rdata = ctrl_cfg[sel].sched_offset;
    if (int'(fld) == REG_ADDR_OFFSET)  cfg_rdata = ctrl_cfg[sel].addr_offset;
    if (int'(fld) == REG_ADDR2_OFFSET) cfg_rdata = ctrl_cfg[sel].addr2_offset;
  end

endmodule
