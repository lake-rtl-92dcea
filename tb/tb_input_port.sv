// tb_input_port: one input port packing a 16-bit stream into SRAM writes.
//
// The narrow side takes N words, one per cycle from cycle 2, into the
// aggregation buffer at address k mod 8. The wide side drains slot j mod 2
// to SRAM word BASE + j at cycle 2 + 4j + 4, the first cycle after the slot's
// last word was taken (1-cycle buffer write). The bench checks in_fire
// timing, every write request's cycle, address and packed data, and done.
// A second run adds a 2-D narrow nest (the same stream in 4-word rows).
module tb_input_port;
  import lake_pkg::*;
  import lake_tb_pkg::*;

  localparam int N = 32, BASE = 40;

  logic clk = 0, rst_n = 0, restart = 0;
  logic [CNT_W-1:0] cycle = '0;
  ctrl_cfg_t cfg_narrow, cfg_wide;
  logic [DATA_W-1:0]  data_in;
  logic               wr_req, in_fire, done;
  logic [SRAM_AW-1:0] wr_addr;
  logic [WIDE_W-1:0]  wr_data;
  logic [DATA_W-1:0]  stream [N];
  logic [WIDE_W-1:0]  exp_w;
  int checks = 0, failures = 0, nwr, nin;
  ivec_t e, s, a, z;

  input_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run();
    for (int k = 0; k < N; k++) stream[k] = DATA_W'($urandom);
    cycle = '0;
    restart = 1; @(negedge clk); restart = 0;
    nwr = 0; nin = 0;
    while (int'(cycle) < N + 20) begin
      data_in = (int'(cycle) >= 2 && int'(cycle) < N + 2) ? stream[int'(cycle) - 2] : DATA_W'($urandom);
      #1;
      check(in_fire == (int'(cycle) >= 2 && int'(cycle) < N + 2), "in_fire timing");
      if (in_fire) nin++;
      if ((int'(cycle) - 6) % 4 == 0 && int'(cycle) >= 6 && nwr < N / VEC) begin
        check(wr_req, "write request timing");
        for (int l = 0; l < VEC; l++) exp_w[l*DATA_W +: DATA_W] = stream[nwr * VEC + l];
        check(wr_addr == SRAM_AW'(BASE + nwr), "write address");
        check(wr_data == exp_w, "packed data");
        nwr++;
      end else begin
        check(!wr_req, "no spurious write");
      end
      @(negedge clk); cycle++;
    end
    check(nwr == N / VEC && nin == N, "all words moved");
    check(done, "done");
  endtask

  initial begin
    data_in = '0;
    cfg_narrow = '0; cfg_wide = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg_narrow = mk_cfg_1d(N, 2, 1, 0, 1);
    cfg_wide   = mk_cfg_1d(N / VEC, 6, 4, 0, 1, BASE, 1);
    run();
    // 2-D narrow nest: rows of 4 words
    e = '{default: 1}; s = '{default: 0}; a = '{default: 0}; z = '{default: 0};
    e[0] = VEC; e[1] = N / VEC;
    s[0] = 1;   s[1] = VEC;
    a[0] = 1;   a[1] = VEC;
    cfg_narrow = mk_cfg(2, e, s, 2, a, 0, z, 0);
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
