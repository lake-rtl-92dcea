// tb_address_generator: incremental addresses against the affine formula.
//
// The bench runs its own loop nest (random dims, extents and signed strides),
// drives step and inc_dim from it, programs the generator with deltas from
// lake_pkg::to_delta, and after every step compares addr with
// offset + sum(stride[d] * iter[d]) computed directly (mod 2^16).
module tb_address_generator;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [DIM_W-1:0]          inc_dim;
  logic [CNT_W-1:0]          cfg_offset;
  logic [DIM-1:0][CNT_W-1:0] cfg_delta;
  logic [CNT_W-1:0]          addr;
  int checks = 0, failures = 0;

  address_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DIM-1:0][CNT_W-1:0] stride, extent;
  int it [DIM];
  int nd, total, inc;
  logic [CNT_W-1:0] expect_addr;

  initial begin
    inc_dim = '0; cfg_offset = '0; cfg_delta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      nd = $urandom_range(1, DIM);
      total = 1;
      for (int d = 0; d < DIM; d++) begin
        extent[d] = (d < nd) ? CNT_W'($urandom_range(1, 4)) : CNT_W'(1);
        stride[d] = CNT_W'($urandom_range(0, 65535));
        total *= int'(extent[d]);
        it[d] = 0;
      end
      cfg_offset = CNT_W'($urandom);
      cfg_delta  = to_delta(stride, extent);
      restart = 1;
      @(negedge clk);
      restart = 0;
      for (int s = 0; s < total; s++) begin
        expect_addr = cfg_offset;
        for (int d = 0; d < DIM; d++) expect_addr += stride[d] * CNT_W'(it[d]);
        checks++;
        if (addr !== expect_addr) begin
          failures++;
          if (failures < 10) $display("FAIL addr %h exp %h", addr, expect_addr);
        end
        if (s == total - 1) break;
        inc = 0;
        while (it[inc] == int'(extent[inc]) - 1) begin it[inc] = 0; inc++; end
        it[inc]++;
        inc_dim = DIM_W'(inc);
        step = 1;
        @(negedge clk);
        step = 0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);  // idle cycles hold the address
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
