// tb_mem_port_arbiter: request multiplexing, read return and conflicts.
//
// Random request patterns (often single requests, sometimes collisions) are
// applied. The bench works out the winner by the arbiter's fixed priority
// (input 0, input 1, output 0, output 1) and checks the SRAM-side pins, the
// conflict flag and that rd_valid returns to the winning reader one cycle
// later with the SRAM's data passed through.
module tb_mem_port_arbiter;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NUM_IN-1:0]               wr_req = '0;
  logic [NUM_IN-1:0][SRAM_AW-1:0]  wr_addr;
  logic [NUM_IN-1:0][WIDE_W-1:0]   wr_data;
  logic [NUM_OUT-1:0]              rd_req = '0;
  logic [NUM_OUT-1:0][SRAM_AW-1:0] rd_addr;
  logic [NUM_OUT-1:0]              rd_valid;
  logic [WIDE_W-1:0]               rd_data;
  logic                            conflict;
  logic                            mem_cen, mem_wen;
  logic [SRAM_AW-1:0]              mem_addr;
  logic [WIDE_W-1:0]               mem_wdata, mem_rdata;
  logic [NUM_OUT-1:0]              exp_valid;
  int checks = 0, failures = 0, nreq, win, nconf = 0;

  mem_port_arbiter dut (.*);

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    mem_rdata = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    exp_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(rd_valid == exp_valid, "rd_valid one cycle after grant");
      mem_rdata = {$urandom, $urandom};
      #1;
      check(rd_data == mem_rdata, "read data passed through");
      for (int p = 0; p < NUM_IN; p++) begin
        wr_req[p]  = 1'b0;
        wr_addr[p] = SRAM_AW'($urandom);
        wr_data[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < NUM_OUT; p++) begin
        rd_req[p]  = 1'b0;
        rd_addr[p] = SRAM_AW'($urandom);
      end
      if ($urandom_range(0, 3) == 0) begin
        wr_req = NUM_IN'($urandom); rd_req = NUM_OUT'($urandom);
      end else begin
        win = $urandom_range(0, NUM_IN + NUM_OUT);  // last value = idle
        if (win < NUM_IN) wr_req[win] = 1'b1;
        else if (win < NUM_IN + NUM_OUT) rd_req[win - NUM_IN] = 1'b1;
      end
      #1;
      nreq = $countones(wr_req) + $countones(rd_req);
      win = -1;
      for (int p = NUM_IN + NUM_OUT - 1; p >= 0; p--)
        if (p < NUM_IN ? wr_req[p] : rd_req[p - NUM_IN]) win = p;
      check(conflict == (nreq > 1), "conflict flag");
      if (nreq > 1) nconf++;
      check(mem_cen == (win >= 0), "cen");
      exp_valid = '0;
      if (win >= 0 && win < NUM_IN) begin
        check(mem_wen && mem_addr == wr_addr[win] && mem_wdata == wr_data[win], "write routed");
      end else if (win >= NUM_IN) begin
        check(!mem_wen && mem_addr == rd_addr[win - NUM_IN], "read routed");
        exp_valid[win - NUM_IN] = 1'b1;
      end
    end
    check(nconf > 0, "conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
