// tb_seq_ctrl: a whole sequencing controller against a loop-nest model.
//
// Random configurations (dims 1..6, extents 1..3, increasing schedules,
// arbitrary address strides for both generators) are applied; every cycle
// the bench checks that fire is high exactly at the affine timestamps, that
// both addresses equal their affine formulas at each event, and that done
// rises after the last event. A controller with dim = 0 must never fire.
module tb_seq_ctrl;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0;
  ctrl_cfg_t cfg;
  logic [CNT_W-1:0] cycle = '0;
  logic fire, done;
  logic [1:0][CNT_W-1:0] addr;
  int checks = 0, failures = 0;

  seq_ctrl #(.NUM_AG(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d", what, cycle);
    end
  endtask

  logic [DIM-1:0][CNT_W-1:0] s_st, a_st, b_st;
  int it [DIM];
  int nd, total, issued, inc, span;
  logic [CNT_W-1:0] t_exp, a_exp, b_exp;

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // controller off
    restart = 1; @(negedge clk); restart = 0;
    for (int c = 0; c < 50; c++) begin
      check(!fire && done, "off controller idle");
      @(negedge clk); cycle++;
    end
    for (int t = 0; t < 25; t++) begin
      nd = $urandom_range(1, DIM);
      total = 1; span = 1;
      cfg = '0;
      cfg.dim = DIM_W'(nd);
      for (int d = 0; d < DIM; d++) begin
        cfg.extent[d] = CNT_W'($urandom_range(1, 3));
        s_st[d] = CNT_W'(span + $urandom_range(0, 1));
        a_st[d] = CNT_W'($urandom);
        b_st[d] = CNT_W'($urandom_range(0, 7));
        if (d < nd) begin
          span = int'(s_st[d]) * int'(cfg.extent[d]);
          total *= int'(cfg.extent[d]);
        end
        it[d] = 0;
      end
      cfg.sched_offset = CNT_W'($urandom_range(2, 9));
      cfg.addr_offset  = CNT_W'($urandom);
      cfg.addr2_offset = CNT_W'($urandom_range(0, 7));
      cfg.sched_delta  = to_delta(s_st, cfg.extent);
      cfg.addr_delta   = to_delta(a_st, cfg.extent);
      cfg.addr2_delta  = to_delta(b_st, cfg.extent);
      cycle = '0;
      restart = 1; @(negedge clk); restart = 0;
      issued = 0;
      while (int'(cycle) < span + 30) begin
        t_exp = cfg.sched_offset; a_exp = cfg.addr_offset; b_exp = cfg.addr2_offset;
        for (int d = 0; d < nd; d++) begin
          t_exp += s_st[d] * CNT_W'(it[d]);
          a_exp += a_st[d] * CNT_W'(it[d]);
          b_exp += b_st[d] * CNT_W'(it[d]);
        end
        #1;
        check(fire == (issued < total && cycle == t_exp), "fire timing");
        check(done == (issued == total), "done");
        if (fire) begin
          check(addr[0] == a_exp, "address 0");
          check(addr[1] == b_exp, "address 1");
          issued++;
          inc = 0;
          while (inc < nd - 1 && it[inc] == int'(cfg.extent[inc]) - 1) begin it[inc] = 0; inc++; end
          it[inc]++;
        end
        @(negedge clk); cycle++;
      end
      check(issued == total, "event count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
