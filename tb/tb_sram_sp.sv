// tb_sram_sp: the single-port SRAM against an associative-array model.
//
// Writes the whole memory, then issues random reads and writes. After a read
// the data must appear on rdata in the next cycle (1-cycle read) and hold
// through following write cycles; a cycle with cen low changes nothing.
module tb_sram_sp;
  import lake_pkg::*;

  logic clk = 0, cen = 0, wen = 0;
  logic [SRAM_AW-1:0] addr = '0;
  logic [WIDE_W-1:0]  wdata = '0, rdata;
  logic [WIDE_W-1:0]  model [SRAM_DEPTH];
  logic [WIDE_W-1:0]  last_read;
  bit   pending;
  int checks = 0, failures = 0;

  sram_sp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < SRAM_DEPTH; a++) begin
      @(negedge clk);
      cen = 1; wen = 1; addr = SRAM_AW'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    pending = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== last_read) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h exp %h", rdata, last_read);
        end
      end
      cen   = $urandom_range(0, 3) != 0;
      wen   = $urandom_range(0, 1) == 1;
      addr  = SRAM_AW'($urandom);
      wdata = {$urandom, $urandom};
      if (cen && wen) model[addr] = wdata;
      if (cen && !wen) begin
        last_read = model[addr];
        pending = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
