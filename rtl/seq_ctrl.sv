// seq_ctrl: one sequencing controller (IterationDomain + ScheduleGenerator +
// one or two AddressGenerators) as used on each side of each port.
//
// All generators share one iteration domain, so the addresses and the
// schedule walk the same loop nest. fire is high in the cycle of an access,
// and addr[k] then holds the address of generator k for that access. done is
// high once the whole domain has been issued, or when the controller is off
// (cfg.dim = 0). restart reloads offsets and clears the counters.
//
// Controllers on the wide side of a port use NUM_AG = 2: one address for the
// vectorization-buffer slot and one for the SRAM word. That split is this
// design's choice; the tile specification gives each port an iteration
// domain, address generator and schedule generator.
module seq_ctrl
  import lake_pkg::*;
#(
  parameter int unsigned NUM_AG = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         restart,
  input  ctrl_cfg_t                    cfg,
  input  logic [CNT_W-1:0]             cycle,
  output logic                         fire,
  output logic [NUM_AG-1:0][CNT_W-1:0] addr,
  output logic                         done
);

  logic [DIM-1:0][CNT_W-1:0] iter;
  logic [DIM_W-1:0]          inc_dim;
  logic                      last;

  iteration_domain u_id (
    .clk, .rst_n, .restart,
    .step       (fire),
    .cfg_dim    (cfg.dim),
    .cfg_extent (cfg.extent),
    .iter,
    .inc_dim,
    .last,
    .done
  );

  schedule_generator u_sg (
    .clk, .rst_n, .restart,
    .active     (!done),
    .cycle,
    .inc_dim,
    .cfg_offset (cfg.sched_offset),
    .cfg_delta  (cfg.sched_delta),
    .fire,
    .sched      ()
  );

  address_generator u_ag0 (
    .clk, .rst_n, .restart,
    .step       (fire),
    .inc_dim,
    .cfg_offset (cfg.addr_offset),
    .cfg_delta  (cfg.addr_delta),
    .addr       (addr[0])
  );

  if (NUM_AG > 1) begin : g_ag1
    address_generator u_ag1 (
      .clk, .rst_n, .restart,
      .step       (fire),
      .inc_dim,
      .cfg_offset (cfg.addr2_offset),
      .cfg_delta  (cfg.addr2_delta),
      .addr       (addr[1])
    );
  end

endmodule
