// tb_agg_buffer: narrow writes packed into wide slots.
//
// Random narrow writes are mirrored in a bench array; every cycle the wide
// read of a random slot must equal the four mirrored words of that slot
// (lane 0 in the low bits), which also checks the 1-cycle write: a word is
// visible in the cycle after it is written and not before.
module tb_agg_buffer;
  import lake_pkg::*;

  logic clk = 0, wr_en = 0;
  logic [VEC_AW-1:0]  wr_addr = '0;
  logic [DATA_W-1:0]  wr_data = '0;
  logic [SLOT_AW-1:0] rd_slot = '0;
  logic [WIDE_W-1:0]  rd_data;
  logic [DATA_W-1:0]  model [VEC * VEC_SLOTS];
  logic [WIDE_W-1:0]  exp_w;
  int checks = 0, failures = 0;

  agg_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once so the model is defined
    for (int a = 0; a < VEC * VEC_SLOTS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = VEC_AW'(a); wr_data = DATA_W'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check before the write of this cycle takes effect
      rd_slot = SLOT_AW'($urandom_range(0, VEC_SLOTS - 1));
      #1;
      for (int l = 0; l < VEC; l++) exp_w[l*DATA_W +: DATA_W] = model[int'(rd_slot) * VEC + l];
      checks++;
      if (rd_data !== exp_w) begin
        failures++;
        if (failures < 10) $display("FAIL slot %0d got %h exp %h", rd_slot, rd_data, exp_w);
      end
      wr_en   = $urandom_range(0, 1) == 1;
      wr_addr = VEC_AW'($urandom);
      wr_data = DATA_W'($urandom);
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
