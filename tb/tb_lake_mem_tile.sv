// tb_lake_mem_tile: end-to-end runs of the memory tile at its default size.
//
// All configuration goes through the register bus, computed from affine
// loop nests by lake_tb_pkg::mk_cfg. Three schedules are run, each started
// with start:
//
//  1. Stencil buffer (brighten -> 2x1 blur). Input port 0 takes an image x
//     of W = 64 columns and H = 4 rows, one pixel per cycle from cycle 0, and
//     writes SRAM word k (pixels 4k..4k+3) at cycle 4k+4; input port 1 takes
//     a 64-word stream y into words 64..79 at cycles 4k+7. Output ports 0 and
//     1 emit the two taps of a vertical 2x1 window as streams shifted by one
//     row: at cycle 72+j port 0 gives x[j] and port 1 gives x[j+64]
//     (j = 0..191). One row of delay is the algorithmic offset of 64 cycles;
//     the remaining 8 cycles cover packing, the SRAM read and unpacking. The
//     SRAM reads sit at cycles 1 and 2 mod 4, writes at 0 and 3 mod 4, so the
//     four ports share the single SRAM port without collision.
//  2. Reordering. Input 1 is switched off and input 0 writes a new stream to
//     words 128..143. Output 0 reads y back in order with a 2-D nest, and
//     output 1 reads y reversed (2-D nest, negative inner stride).
//  3. Full-depth nests, then a collision. Output 0 reads the stream input 0
//     stored in schedule 2 with a 6-D narrow nest (extents 2) and a 3-D wide
//     nest. Then output 0's reads are moved onto the cycles of input 0's
//     writes; conflict must be raised.
//
// Each cycle the bench compares valid_out/data_out with the expected
// stream (value and cycle). It counts how often each mechanism occurred
// (wide write, wide read, buffer slot reuse, multi-dimensional wrap, reverse
// order, controller off, register read-back, conflict) and fails any that
// never occurred.
module tb_lake_mem_tile;
  import lake_pkg::*;
  import lake_tb_pkg::*;

  localparam int N  = 64;       // stream length of the later schedules
  localparam int W  = 64;       // image width: row offset between the taps
  localparam int H  = 4;        // image height
  localparam int NX = W * H;
  localparam int T0 = 72;

  logic clk = 0, rst_n = 0;
  logic cfg_wr = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CNT_W-1:0]  cfg_wdata = '0, cfg_rdata;
  logic start = 0, done, conflict;
  logic [NUM_IN-1:0][DATA_W-1:0]  data_in;
  logic [NUM_IN-1:0]              in_fire;
  logic [NUM_OUT-1:0][DATA_W-1:0] data_out;
  logic [NUM_OUT-1:0]             valid_out;

  lake_mem_tile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc;
  logic [DATA_W-1:0] x [NX], y [NX], z [NX];
  // expected output per port and cycle: -1 = no output
  int exp_val [NUM_OUT][512];
  localparam int NS = NX;

  // mechanism counters
  int n_wide_wr = 0, n_wide_rd = 0, n_slot_reuse = 0, n_multidim = 0;
  int n_sixdim = 0, n_reverse = 0, n_off = 0, n_readback = 0, n_conflict = 0, n_stencil = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic reg_write(input int c, input int f, input logic [CNT_W-1:0] v);
    @(negedge clk);
    cfg_wr = 1; cfg_addr = CFG_AW'(c * REGS_PER_CTRL + f); cfg_wdata = v;
    @(negedge clk);
    cfg_wr = 0;
  endtask

  task automatic program_ctrl(input int c, input ctrl_cfg_t v);
    reg_write(c, REG_DIM, CNT_W'(v.dim));
    for (int d = 0; d < DIM; d++) begin
      reg_write(c, REG_EXTENT + d,      v.extent[d]);
      reg_write(c, REG_SCHED_DELTA + d, v.sched_delta[d]);
      reg_write(c, REG_ADDR_DELTA + d,  v.addr_delta[d]);
      reg_write(c, REG_ADDR2_DELTA + d, v.addr2_delta[d]);
    end
    reg_write(c, REG_SCHED_OFFSET, v.sched_offset);
    reg_write(c, REG_ADDR_OFFSET,  v.addr_offset);
    reg_write(c, REG_ADDR2_OFFSET, v.addr2_offset);
    // read back the schedule offset
    cfg_addr = CFG_AW'(c * REGS_PER_CTRL + REG_SCHED_OFFSET);
    #1;
    check(cfg_rdata == v.sched_offset, "register read-back");
    n_readback++;
  endtask

  // Run one schedule for ncyc cycles, feeding streams and checking outputs.
  task automatic run(input int ncyc, input bit expect_conflict,
                     input logic [DATA_W-1:0] s0 [NX], input logic [DATA_W-1:0] s1 [NX]);
    int seen_conf;
    seen_conf = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (cyc = 0; cyc < ncyc; cyc++) begin
      data_in[0] = (cyc < NX) ? s0[cyc] : DATA_W'($urandom);
      data_in[1] = (cyc < NX) ? s1[cyc] : DATA_W'($urandom);
      #1;
      if (dut.u_arb.mem_cen &&  dut.u_arb.mem_wen) n_wide_wr++;
      if (dut.u_arb.mem_cen && !dut.u_arb.mem_wen) n_wide_rd++;
      if (conflict) seen_conf++;
      if (!expect_conflict) check(!conflict, "no conflict in a valid schedule");
      if (!expect_conflict) begin
        for (int p = 0; p < NUM_OUT; p++) begin
          check(valid_out[p] == (exp_val[p][cyc] >= 0), $sformatf("port %0d valid", p));
          if (valid_out[p] && exp_val[p][cyc] >= 0)
            check(data_out[p] == DATA_W'(exp_val[p][cyc]), $sformatf("port %0d data", p));
        end
      end
      @(negedge clk);
    end
    if (expect_conflict) begin
      check(seen_conf > 0, "conflict raised");
      n_conflict += seen_conf;
    end else begin
      check(done, "all controllers done");
    end
  endtask

  ivec_t e, s, a, b;

  initial begin
    data_in = '0;
    for (int i = 0; i < NX; i++) begin
      x[i] = DATA_W'($urandom); y[i] = DATA_W'($urandom); z[i] = DATA_W'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(done, "idle tile reports done");

    // ---------------- schedule 1: stencil buffer ----------------
    program_ctrl(ctrl_in_narrow(0), mk_cfg_1d(NX, 0, 1, 0, 1));
    program_ctrl(ctrl_in_wide(0),   mk_cfg_1d(NX / VEC, 4, 4, 0, 1, 0, 1));
    program_ctrl(ctrl_in_narrow(1), mk_cfg_1d(N, 0, 1, 0, 1));
    program_ctrl(ctrl_in_wide(1),   mk_cfg_1d(N / VEC, 7, 4, 0, 1, 64, 1));
    // tap 0 (row r): words 0 .. (NX-W)/4-1, read 3 cycles before first use
    program_ctrl(ctrl_out_wide(0),   mk_cfg_1d((NX - W) / VEC, T0 - 3, 4, 0, 1, 0, 1));
    program_ctrl(ctrl_out_narrow(0), mk_cfg_1d(NX - W, T0, 1, 0, 1));
    // tap 1 (row r+1): words W/4 .., read 2 cycles before first use
    program_ctrl(ctrl_out_wide(1),   mk_cfg_1d((NX - W) / VEC, T0 - 2, 4, 0, 1, W / VEC, 1));
    program_ctrl(ctrl_out_narrow(1), mk_cfg_1d(NX - W, T0, 1, 0, 1));
    for (int p = 0; p < NUM_OUT; p++) for (int c = 0; c < 512; c++) exp_val[p][c] = -1;
    for (int j = 0; j < NX - W; j++) begin
      exp_val[0][T0 + j] = int'(x[j]);
      exp_val[1][T0 + j] = int'(x[j + W]);
    end
    run(T0 + NX - W + 10, 0, x, y);
    n_stencil++;
    n_slot_reuse += (N / VEC > VEC_SLOTS) ? 1 : 0;

    // ---------------- schedule 2: reordered read-back ----------------
    program_ctrl(ctrl_in_narrow(0), mk_cfg_1d(N, 0, 1, 0, 1));
    program_ctrl(ctrl_in_wide(0),   mk_cfg_1d(N / VEC, 4, 4, 0, 1, 128, 1));
    reg_write(ctrl_in_narrow(1), REG_DIM, '0);
    reg_write(ctrl_in_wide(1),   REG_DIM, '0);
    n_off++;
    // port 0: y in order, rows of 4 (2-D nest)
    e = '{default: 1}; s = '{default: 0}; a = '{default: 0}; b = '{default: 0};
    e[0] = VEC; e[1] = N / VEC; s[0] = 1; s[1] = VEC; a[0] = 1; a[1] = VEC;
    program_ctrl(ctrl_out_narrow(0), mk_cfg(2, e, s, 8, a, 0, b, 0));
    program_ctrl(ctrl_out_wide(0),   mk_cfg_1d(N / VEC, 5, 4, 0, 1, 64, 1));
    // port 1: y reversed, lanes walked downwards (inner stride -1)
    a[0] = -1; a[1] = VEC;
    program_ctrl(ctrl_out_narrow(1), mk_cfg(2, e, s, 8, a, VEC - 1, b, 0));
    program_ctrl(ctrl_out_wide(1),   mk_cfg_1d(N / VEC, 2, 4, 0, 1, 64 + N / VEC - 1, -1));
    for (int p = 0; p < NUM_OUT; p++) for (int c = 0; c < 512; c++) exp_val[p][c] = -1;
    for (int m = 0; m < N; m++) begin
      exp_val[0][8 + m] = int'(y[m]);
      exp_val[1][8 + m] = int'(y[N - 1 - m]);
    end
    run(N + 20, 0, z, z);
    n_multidim++;
    n_reverse++;

    // ---------------- schedule 3: read back z, then a collision ----------------
    program_ctrl(ctrl_in_narrow(0), '0);
    program_ctrl(ctrl_in_wide(0),   '0);
    e = '{default: 1}; s = '{default: 0}; a = '{default: 0};
    // the same linear walk split into nests of full depth: 6-D (2^6) on the
    // narrow side, 3-D (2 x 2 x 4) on the wide side
    e = '{default: 2}; s = '{1, 2, 4, 8, 16, 32}; a = '{1, 2, 4, 8, 16, 32};
    program_ctrl(ctrl_out_narrow(0), mk_cfg(DIM, e, s, 8, a, 0, b, 0));
    e = '{2, 2, 4, 1, 1, 1}; s = '{4, 8, 16, 0, 0, 0}; a = '{1, 2, 4, 0, 0, 0};
    program_ctrl(ctrl_out_wide(0),   mk_cfg(3, e, s, 5, a, 0, a, 128));
    n_sixdim++;
    program_ctrl(ctrl_out_narrow(1), '0);
    program_ctrl(ctrl_out_wide(1),   '0);
    for (int p = 0; p < NUM_OUT; p++) for (int c = 0; c < 512; c++) exp_val[p][c] = -1;
    for (int m = 0; m < N; m++) exp_val[0][8 + m] = int'(z[m]);
    run(N + 20, 0, z, z);
    // collision: output 0 reads on input 0's write cycles
    program_ctrl(ctrl_in_narrow(0), mk_cfg_1d(N, 0, 1, 0, 1));
    program_ctrl(ctrl_in_wide(0),   mk_cfg_1d(N / VEC, 4, 4, 0, 1, 0, 1));
    program_ctrl(ctrl_out_wide(0),  mk_cfg_1d(N / VEC, 8, 4, 0, 1, 0, 1));
    run(N + 20, 1, x, x);

    check(n_wide_wr > 0,    "wide writes happened");
    check(n_wide_rd > 0,    "wide reads happened");
    check(n_slot_reuse > 0, "vectorization slots reused");
    check(n_multidim > 0,   "multi-dimensional nest run");
    check(n_reverse > 0,    "reordered stream run");
    check(n_sixdim > 0,     "six-dimensional nest run");
    check(n_off > 0,        "controller switched off");
    check(n_readback > 0,   "register read-back");
    check(n_conflict > 0,   "memory-port conflict");
    check(n_stencil > 0,    "stencil schedule run");
    $display("mechanisms: wide_wr=%0d wide_rd=%0d slot_reuse=%0d multidim=%0d sixdim=%0d reverse=%0d off=%0d readback=%0d conflict=%0d stencil=%0d",
             n_wide_wr, n_wide_rd, n_slot_reuse, n_multidim, n_sixdim, n_reverse, n_off, n_readback, n_conflict, n_stencil);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
