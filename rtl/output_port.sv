// output_port: one unified-buffer output Port of the tile.
//
// A wide-side sequencing controller (two address generators: transpose-buffer
// slot and SRAM word) issues SRAM reads with rd_req/rd_addr. The slot of each
// read is held for one cycle and the returning word (rd_valid/rd_data) is
// written into it, so it can be read from the cycle after that. A narrow-side
// controller then emits one 16-bit word per event: valid_out is high in the
// event cycle and data_out carries the transpose-buffer word its address
// generator names (0-cycle read). Like the input port it is statically
// scheduled and has no back-pressure.
//
// The port structure follows the tile specification; the slot pipeline
// register matching the SRAM's 1-cycle read is this design's.
module output_port
  import lake_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic [CNT_W-1:0]     cycle,
  input  ctrl_cfg_t            cfg_wide,
  input  ctrl_cfg_t            cfg_narrow,
  output logic                 rd_req,
  output logic [SRAM_AW-1:0]   rd_addr,
  input  logic                 rd_valid,
  input  logic [WIDE_W-1:0]    rd_data,
  output logic                 valid_out,
  output logic [DATA_W-1:0]    data_out,
  output logic                 done
);

  logic                  n_done, w_done;
  logic [0:0][CNT_W-1:0] n_addr;
  logic [1:0][CNT_W-1:0] w_addr;
  logic [SLOT_AW-1:0]    slot_q;

  seq_ctrl #(.NUM_AG(2)) u_wide (
    .clk, .rst_n, .restart, .cfg(cfg_wide), .cycle,
    .fire(rd_req), .addr(w_addr), .done(w_done)
  );

  seq_ctrl #(.NUM_AG(1)) u_narrow (
    .clk, .rst_n, .restart, .cfg(cfg_narrow), .cycle,
    .fire(valid_out), .addr(n_addr), .done(n_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      slot_q <= '0;
    else if (rd_req) slot_q <= w_addr[0][SLOT_AW-1:0];
  end

  tb_buffer u_tb (
    .clk,
    .wr_en   (rd_valid),
    .wr_slot (slot_q),
    .wr_data (rd_data),
    .rd_addr (n_addr[0][VEC_AW-1:0]),
    .rd_data (data_out)
  );

  assign rd_addr = w_addr[1][SRAM_AW-1:0];
  assign done    = n_done && w_done;

endmodule
