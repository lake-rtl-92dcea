// tb_config_regs: register map writes, read-back and decoded fields.
//
// Writes random values to every defined field of every controller through
// the bus, then reads each back and checks both cfg_rdata and the
// corresponding field of the decoded ctrl_cfg output. Also checks that reset
// leaves every controller off and that unused words read as zero.
module tb_config_regs;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0, cfg_wr = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CNT_W-1:0]  cfg_wdata = '0, cfg_rdata;
  ctrl_cfg_t         ctrl_cfg [NUM_CTRL];
  logic [CNT_W-1:0]  model [NUM_CTRL][REGS_PER_CTRL];
  logic [CNT_W-1:0]  field_val;
  int checks = 0, failures = 0;

  config_regs dut (.*);

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [CNT_W-1:0] field_of(input ctrl_cfg_t c, input int f);
    if (f == REG_DIM) return CNT_W'(c.dim);
    if (f >= REG_EXTENT && f < REG_EXTENT + DIM) return c.extent[f - REG_EXTENT];
    if (f >= REG_SCHED_DELTA && f < REG_SCHED_DELTA + DIM) return c.sched_delta[f - REG_SCHED_DELTA];
    if (f == REG_SCHED_OFFSET) return c.sched_offset;
    if (f >= REG_ADDR_DELTA && f < REG_ADDR_DELTA + DIM) return c.addr_delta[f - REG_ADDR_DELTA];
    if (f == REG_ADDR_OFFSET) return c.addr_offset;
    if (f >= REG_ADDR2_DELTA && f < REG_ADDR2_DELTA + DIM) return c.addr2_delta[f - REG_ADDR2_DELTA];
    if (f == REG_ADDR2_OFFSET) return c.addr2_offset;
    return '0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_CTRL; c++) check(ctrl_cfg[c].dim == '0, "reset turns controllers off");
    for (int c = 0; c < NUM_CTRL; c++)
      for (int f = 0; f < REGS_PER_CTRL; f++) begin
        model[c][f] = (f <= REG_ADDR2_OFFSET) ? CNT_W'($urandom) : '0;
        if (f == REG_DIM) model[c][f] = CNT_W'($urandom_range(0, DIM));
      end
    for (int c = 0; c < NUM_CTRL; c++)
      for (int f = 0; f < REGS_PER_CTRL; f++) begin
        @(negedge clk);
        cfg_wr = 1; cfg_addr = CFG_AW'(c * REGS_PER_CTRL + f);
        cfg_wdata = (f <= REG_ADDR2_OFFSET) ? model[c][f] : CNT_W'($urandom);
      end
    @(negedge clk);
    cfg_wr = 0;
    for (int c = 0; c < NUM_CTRL; c++)
      for (int f = 0; f < REGS_PER_CTRL; f++) begin
        cfg_addr = CFG_AW'(c * REGS_PER_CTRL + f);
        #1;
        check(cfg_rdata == model[c][f], $sformatf("read-back ctrl %0d field %0d", c, f));
        field_val = field_of(ctrl_cfg[c], f);
        check(field_val == model[c][f], $sformatf("decoded ctrl %0d field %0d", c, f));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
