// input_port: one unified-buffer input Port of the tile.
//
// A narrow-side sequencing controller decides in which cycles data_in is
// taken and at which narrow word of the aggregation buffer it is stored. A
// wide-side controller (two address generators: buffer slot and SRAM word)
// decides when a completed 64-bit slot is sent to the SRAM; in that cycle the
// port raises wr_req with wr_addr and the slot's contents as wr_data. The
// port is statically scheduled: there is no handshake, data_in must be valid
// in the cycles its schedule names and the SRAM write is assumed granted.
// Because the buffer write takes one cycle, a slot may be drained at the
// earliest one cycle after its last narrow word was taken.
//
// The port structure (16-bit in, vectorization 4, ID/AG/SG controllers)
// follows the tile specification; the split into a narrow-side and a
// wide-side controller is this design's reading of it.
module input_port
  import lake_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic [CNT_W-1:0]     cycle,
  input  ctrl_cfg_t            cfg_narrow,
  input  ctrl_cfg_t            cfg_wide,
  input  logic [DATA_W-1:0]    data_in,
  output logic                 wr_req,
  output logic [SRAM_AW-1:0]   wr_addr,
  output logic [WIDE_W-1:0]    wr_data,
  output logic                 in_fire,
  output logic                 done
);

  logic                  n_done, w_done;
  logic [0:0][CNT_W-1:0] n_addr;
  logic [1:0][CNT_W-1:0] w_addr;

  seq_ctrl #(.NUM_AG(1)) u_narrow (
    .clk, .rst_n, .restart, .cfg(cfg_narrow), .cycle,
    .fire(in_fire), .addr(n_addr), .done(n_done)
  );

  seq_ctrl #(.NUM_AG(2)) u_wide (
    .clk, .rst_n, .restart, .cfg(cfg_wide), .cycle,
    .fire(wr_req), .addr(w_addr), .done(w_done)
  );

  agg_buffer u_agg (
    .clk,
    .wr_en   (in_fire),
    .wr_addr (n_addr[0][VEC_AW-1:0]),
    .wr_data (data_in),
    .rd_slot (w_addr[0][SLOT_AW-1:0]),
    .rd_data (wr_data)
  );

  assign wr_addr = w_addr[1][SRAM_AW-1:0];
  assign done    = n_done && w_done;

endmodule
