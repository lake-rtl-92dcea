// tb_tb_buffer: wide slot writes read back as narrow words.
//
// Random wide writes are mirrored in a bench array; every cycle a random
// narrow word is read combinationally and compared with the mirror, so the
// lane order and the 1-cycle write are both checked.
module tb_tb_buffer;
  import lake_pkg::*;

  logic clk = 0, wr_en = 0;
  logic [SLOT_AW-1:0] wr_slot = '0;
  logic [WIDE_W-1:0]  wr_data = '0;
  logic [VEC_AW-1:0]  rd_addr = '0;
  logic [DATA_W-1:0]  rd_data;
  logic [WIDE_W-1:0]  model [VEC_SLOTS];
  int checks = 0, failures = 0;

  tb_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < VEC_SLOTS; s++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = SLOT_AW'(s); wr_data = {$urandom, $urandom};
      model[s] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_addr = VEC_AW'($urandom);
      #1;
      checks++;
      if (rd_data !== model[int'(rd_addr) / VEC][(int'(rd_addr) % VEC) * DATA_W +: DATA_W]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h", rd_addr, rd_data);
      end
      wr_en   = $urandom_range(0, 1) == 1;
      wr_slot = SLOT_AW'($urandom);
      wr_data = {$urandom, $urandom};
      if (wr_en) model[wr_slot] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
