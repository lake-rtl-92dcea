// tb_output_port: one output port streaming SRAM words out as 16-bit words.
//
// The bench plays the SRAM and the arbiter: a read request is answered with
// the model word one cycle later (rd_valid). The wide side reads words
// BASE..BASE+N/4-1 into slot j mod 2 at cycle 3 + 4j; the narrow side emits
// word k at cycle 6 + k from transpose address k mod 8 (a word is readable
// two cycles after its SRAM read: 1-cycle SRAM read, 1-cycle buffer write).
// It checks read-request timing and addresses and every output word's cycle
// and value.
module tb_output_port;
  import lake_pkg::*;
  import lake_tb_pkg::*;

  localparam int N = 32, BASE = 100;

  logic clk = 0, rst_n = 0, restart = 0;
  logic [CNT_W-1:0] cycle = '0;
  ctrl_cfg_t cfg_wide, cfg_narrow;
  logic               rd_req, rd_valid, valid_out, done;
  logic [SRAM_AW-1:0] rd_addr;
  logic [WIDE_W-1:0]  rd_data;
  logic [DATA_W-1:0]  data_out;
  logic [WIDE_W-1:0]  mem [SRAM_DEPTH];
  int checks = 0, failures = 0, nrd, nout;

  output_port dut (.*);

  always #5 clk = ~clk;

  // SRAM + arbiter stand-in
  always_ff @(posedge clk) begin
    rd_valid <= rd_req;
    if (rd_req) rd_data <= mem[rd_addr];
  end

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

  initial begin
    for (int i = 0; i < SRAM_DEPTH; i++) mem[i] = {$urandom, $urandom};
    cfg_wide = '0; cfg_narrow = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg_wide   = mk_cfg_1d(N / VEC, 3, 4, 0, 1, BASE, 1);
    cfg_narrow = mk_cfg_1d(N, 6, 1, 0, 1);
    restart = 1; @(negedge clk); restart = 0;
    nrd = 0; nout = 0;
    while (int'(cycle) < N + 20) begin
      #1;
      if (int'(cycle) >= 3 && (int'(cycle) - 3) % 4 == 0 && nrd < N / VEC) begin
        check(rd_req && rd_addr == SRAM_AW'(BASE + nrd), "read request");
        nrd++;
      end else check(!rd_req, "no spurious read");
      if (int'(cycle) >= 6 && nout < N) begin
        check(valid_out, "output timing");
        check(data_out == mem[BASE + nout / VEC][(nout % VEC) * DATA_W +: DATA_W], "output data");
        nout++;
      end else check(!valid_out, "no spurious output");
      @(negedge clk); cycle++;
    end
    check(nout == N && done, "all words emitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
