// iteration_domain: the loop-nest counter of a sequencing controller.
//
// Holds up to DIM loop indices, index 0 innermost. cfg_dim selects how many
// are in use (0 switches the controller off) and cfg_extent gives each loop's
// trip count. Every cycle it reports, combinationally, which dimension would
// increment on the next step (inc_dim: the innermost index not yet at its
// last value; every index below it wraps to zero) and whether the current
// point is the last of the domain (last). A step in the last point sets done,
// which stays set until restart. Counters update on the clock edge that
// samples step, so iter always shows the point being accessed.
//
// Extents and the 6-dimensional depth follow the tile specification; the
// 16-bit counters, the off encoding (cfg_dim = 0) and the restart input are
// this design's choices.
module iteration_domain
  import lake_pkg::*;
#(
  parameter int unsigned ND = DIM,
  parameter int unsigned CW = CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       restart,
  input  logic                       step,
  input  logic [DIM_W-1:0]           cfg_dim,
  input  logic [ND-1:0][CW-1:0]      cfg_extent,
  output logic [ND-1:0][CW-1:0]      iter,
  output logic [DIM_W-1:0]           inc_dim,
  output logic                       last,
  output logic                       done
);

  logic [ND-1:0] at_max;
  logic          done_q;

  always_comb begin
    for (int i = 0; i < ND; i++)
      at_max[i] = (i >= int'(cfg_dim)) || (iter[i] == cfg_extent[i] - CW'(1));
    inc_dim = '0;
    last    = 1'b1;
    for (int i = ND - 1; i >= 0; i--) begin
      if (!at_max[i]) begin
        inc_dim = DIM_W'(i);
        last    = 1'b0;
      end
    end
  end

  assign done = done_q || (cfg_dim == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iter   <= '0;
      done_q <= 1'b0;
    end else if (restart) begin
      iter   <= '0;
      done_q <= 1'b0;
    end else if (step && !done) begin
      if (last) begin
        done_q <= 1'b1;
      end else begin
        for (int i = 0; i < ND; i++) begin
          if (i < int'(inc_dim))       iter[i] <= '0;
          else if (i == int'(inc_dim)) iter[i] <= iter[i] + CW'(1);
        end
      end
    end
  end

endmodule
