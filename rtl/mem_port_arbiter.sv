// mem_port_arbiter: shares the single SRAM MemoryPort among the tile's ports.
//
// The input ports raise write requests and the output ports raise read
// requests. In a statically scheduled tile the compiler places at most one
// access per cycle, so this block is in practice a multiplexer whose select
// comes from the requests. It grants in fixed priority order (input ports
// first, then output ports, lower index first), drives the SRAM, and returns
// the read data with rd_valid to the granted reader one cycle later, matching
// the SRAM's 1-cycle read. If more than one request arrives in a cycle the
// losers are dropped and conflict is raised for that cycle: the schedule was
// not implementable.
//
// Timesharing one MemoryPort and inferring a multiplexer with its arbitration
// follow the tile specification; the priority order and conflict flag are this design's.
module mem_port_arbiter
  import lake_pkg::*;
#(
  parameter int unsigned NI = NUM_IN,
  parameter int unsigned NO = NUM_OUT,
  parameter int unsigned AW = SRAM_AW,
  parameter int unsigned DW = WIDE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NI-1:0]          wr_req,
  input  logic [NI-1:0][AW-1:0]  wr_addr,
  input  logic [NI-1:0][DW-1:0]  wr_data,
  input  logic [NO-1:0]          rd_req,
  input  logic [NO-1:0][AW-1:0]  rd_addr,
  output logic [NO-1:0]          rd_valid,
  output logic [DW-1:0]          rd_data,
  output logic                   conflict,
  // SRAM side
  output logic                   mem_cen,
  output logic                   mem_wen,
  output logic [AW-1:0]          mem_addr,
  output logic [DW-1:0]          mem_wdata,
  input  logic [DW-1:0]          mem_rdata
);

  logic [NO-1:0] rd_grant;
  int unsigned   nreq;

  always_comb begin
    mem_cen   = 1'b0;
    mem_wen   = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    rd_grant  = '0;
    nreq      = 0;
    for (int i = 0; i < int'(NI); i++) nreq += 32'(wr_req[i]);
    for (int i = 0; i < int'(NO); i++) nreq += 32'(rd_req[i]);
    for (int i = int'(NO) - 1; i >= 0; i--) begin
      if (rd_req[i]) begin
        mem_cen  = 1'b1;
        mem_addr = rd_addr[i];
        rd_grant = '0;
        rd_grant[i] = 1'b1;
      end
    end
    for (int i = int'(NI) - 1; i >= 0; i--) begin
      if (wr_req[i]) begin
        mem_cen   = 1'b1;
        mem_wen   = 1'b1;
        mem_addr  = wr_addr[i];
        mem_wdata = wr_data[i];
        rd_grant  = '0;
      end
    end
    conflict = (nreq > 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= '0;
    else        rd_valid <= rd_grant;
  end

  assign rd_data = mem_rdata;

  // A read response goes to exactly one port, and only after a read grant.
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_valid));
  a_granted:    assert property (@(posedge clk) disable iff (!rst_n)
                                 (rd_grant != '0) |=> (rd_valid == $past(rd_grant)));

endmodule
