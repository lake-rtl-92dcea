// lake_mem_tile: a statically scheduled unified-buffer memory tile.
//
// Two 16-bit input ports and two 16-bit output ports share one 2 KB, 64-bit,
// single-port SRAM. Every port packs or unpacks 4 narrow words per SRAM word
// in a 16-byte vectorization buffer, and each side of each port is driven by
// a 6-dimensional sequencing controller (iteration domain, address
// generators, schedule generator). A tile cycle counter, cleared by start,
// is the common time base: a controller acts in the cycle its programmed
// timestamp equals the counter. Controllers are programmed through the
// configuration bus (see config_regs) while idle, then start restarts all of
// them at once. conflict flags a cycle in which two ports asked for the SRAM.
//
// Interface timing: data_in[p] is sampled in the cycles the input port's
// narrow schedule names; valid_out[p] marks the cycles in which data_out[p]
// carries an output word. done is high when every configured controller has
// finished its domain.
//
// Port counts, widths, SRAM size and latencies follow the tile specification;
// the time base, configuration bus and conflict flag are this design's.
module lake_mem_tile
  import lake_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration bus
  input  logic                             cfg_wr,
  input  logic [CFG_AW-1:0]                cfg_addr,
  input  logic [CNT_W-1:0]                 cfg_wdata,
  output logic [CNT_W-1:0]                 cfg_rdata,
  // control
  input  logic                             start,
  output logic                             done,
  output logic                             conflict,
  // streams
  input  logic [NUM_IN-1:0][DATA_W-1:0]    data_in,
  output logic [NUM_IN-1:0]                in_fire,
  output logic [NUM_OUT-1:0][DATA_W-1:0]   data_out,
  output logic [NUM_OUT-1:0]               valid_out
);

  ctrl_cfg_t                         cfg [NUM_CTRL];
  logic [CNT_W-1:0]                  cycle;
  logic [NUM_IN-1:0]                 wr_req;
  logic [NUM_IN-1:0][SRAM_AW-1:0]    wr_addr;
  logic [NUM_IN-1:0][WIDE_W-1:0]     wr_data;
  logic [NUM_OUT-1:0]                rd_req, rd_valid;
  logic [NUM_OUT-1:0][SRAM_AW-1:0]   rd_addr;
  logic [WIDE_W-1:0]                 rd_data;
  logic [NUM_IN-1:0]                 in_done;
  logic [NUM_OUT-1:0]                out_done;
  logic                              mem_cen, mem_wen;
  logic [SRAM_AW-1:0]                mem_addr;
  logic [WIDE_W-1:0]                 mem_wdata, mem_rdata;

  // Tile time base.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cycle <= '0;
    else if (start) cycle <= '0;
    else            cycle <= cycle + CNT_W'(1);
  end

  config_regs u_cfg (
    .clk, .rst_n, .cfg_wr, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .ctrl_cfg (cfg)
  );

  for (genvar p = 0; p < NUM_IN; p++) begin : g_in
    input_port u_in (
      .clk, .rst_n,
      .restart    (start),
      .cycle,
      .cfg_narrow (cfg[ctrl_in_narrow(p)]),
      .cfg_wide   (cfg[ctrl_in_wide(p)]),
      .data_in    (data_in[p]),
      .wr_req     (wr_req[p]),
      .wr_addr    (wr_addr[p]),
      .wr_data    (wr_data[p]),
      .in_fire    (in_fire[p]),
      .done       (in_done[p])
    );
  end

  for (genvar p = 0; p < NUM_OUT; p++) begin : g_out
    output_port u_out (
      .clk, .rst_n,
      .restart    (start),
      .cycle,
      .cfg_wide   (cfg[ctrl_out_wide(p)]),
      .cfg_narrow (cfg[ctrl_out_narrow(p)]),
      .rd_req     (rd_req[p]),
      .rd_addr    (rd_addr[p]),
      .rd_valid   (rd_valid[p]),
      .rd_data    (rd_data),
      .valid_out  (valid_out[p]),
      .data_out   (data_out[p]),
      .done       (out_done[p])
    );
  end

  mem_port_arbiter u_arb (
    .clk, .rst_n,
    .wr_req, .wr_addr, .wr_data,
    .rd_req, .rd_addr, .rd_valid, .rd_data,
    .conflict,
    .mem_cen, .mem_wen, .mem_addr, .mem_wdata, .mem_rdata
  );

  sram_sp u_sram (
    .clk,
    .cen   (mem_cen),
    .wen   (mem_wen),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  assign done = (&in_done) && (&out_done);

endmodule
