// tb_iteration_domain: random loop nests against a software loop counter.
//
// For 40 random configurations (1..6 dimensions, extents 1..4) the bench
// steps the iteration domain on random cycles and, every cycle, compares
// iter, inc_dim, last and done with a reference counter kept in the bench.
// It also checks that done rises after exactly prod(extent) steps and that
// a controller with dim = 0 reports done at once.
module tb_iteration_domain;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [DIM_W-1:0]          cfg_dim;
  logic [DIM-1:0][CNT_W-1:0] cfg_extent;
  logic [DIM-1:0][CNT_W-1:0] iter;
  logic [DIM_W-1:0]          inc_dim;
  logic last, done;
  int checks = 0, failures = 0;

  iteration_domain dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ref_it [DIM];
  int total, issued, exp_inc;
  bit exp_last;

  initial begin
    cfg_dim = 0; cfg_extent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(done, "dim=0 means done");
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      cfg_dim = DIM_W'(1 + $urandom_range(0, DIM - 1));
      total = 1;
      for (int d = 0; d < DIM; d++) begin
        cfg_extent[d] = CNT_W'($urandom_range(1, 4));
        if (d < int'(cfg_dim)) total *= int'(cfg_extent[d]);
        ref_it[d] = 0;
      end
      restart = 1;
      @(negedge clk);
      restart = 0;
      issued = 0;
      while (issued <= total) begin
        // reference for the current point
        exp_last = 1; exp_inc = 0;
        for (int d = int'(cfg_dim) - 1; d >= 0; d--)
          if (ref_it[d] != int'(cfg_extent[d]) - 1) begin exp_last = 0; exp_inc = d; end
        if (issued == total) begin
          check(done, "done after all steps");
          break;
        end
        check(!done, "not done early");
        check(last == exp_last, "last");
        if (!exp_last) check(int'(inc_dim) == exp_inc, "inc_dim");
        for (int d = 0; d < DIM; d++) check(int'(iter[d]) == ref_it[d], "iter");
        step = ($urandom_range(0, 2) != 0);
        @(negedge clk);
        if (step) begin
          issued++;
          if (!exp_last) begin
            for (int d = 0; d < exp_inc; d++) ref_it[d] = 0;
            ref_it[exp_inc]++;
          end
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
