// tb_schedule_generator: access events against affine timestamps.
//
// The bench keeps a cycle counter and its own loop nest. For random
// configurations with positive strides (an implementable schedule needs
// strictly increasing timestamps) it computes the expected event times
// offset + sum(stride[d]*iter[d]) and checks, every cycle, that fire is high
// exactly at those times and that no event happens once the nest is over.
module tb_schedule_generator;
  import lake_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, active = 0;
  logic [CNT_W-1:0]          cycle;
  logic [DIM_W-1:0]          inc_dim;
  logic [CNT_W-1:0]          cfg_offset;
  logic [DIM-1:0][CNT_W-1:0] cfg_delta;
  logic                      fire;
  logic [CNT_W-1:0]          sched;
  int checks = 0, failures = 0;

  schedule_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DIM-1:0][CNT_W-1:0] stride, extent;
  int it [DIM];
  int nd, total, issued, inc, span;
  logic [CNT_W-1:0] next_t;

  initial begin
    cycle = '0; inc_dim = '0; cfg_offset = '0; cfg_delta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      nd = $urandom_range(1, 4);
      total = 1; span = 1;
      for (int d = 0; d < DIM; d++) begin
        extent[d] = (d < nd) ? CNT_W'($urandom_range(1, 4)) : CNT_W'(1);
        // stride of dimension d exceeds the span of all inner dimensions
        stride[d] = CNT_W'(span + $urandom_range(0, 2));
        span = int'(stride[d]) * int'(extent[d]);
        total *= int'(extent[d]);
        it[d] = 0;
      end
      cfg_offset = CNT_W'($urandom_range(3, 20));
      cfg_delta  = to_delta(stride, extent);
      restart = 1; cycle = '0; active = 0;
      @(negedge clk);
      restart = 0; active = 1;
      issued = 0;
      inc = 0;
      while (cycle < CNT_W'(span + 40)) begin
        next_t = cfg_offset;
        for (int d = 0; d < DIM; d++) next_t += stride[d] * CNT_W'(it[d]);
        // the bench tells the generator which dimension increments next
        inc = 0;
        while (inc < DIM - 1 && it[inc] == int'(extent[inc]) - 1) inc++;
        inc_dim = DIM_W'(inc);
        active  = (issued < total);
        #1;
        checks++;
        if (fire !== (issued < total && cycle == next_t)) begin
          failures++;
          if (failures < 10) $display("FAIL fire=%b cycle=%0d exp_t=%0d", fire, cycle, next_t);
        end
        if (fire) begin
          issued++;
          for (int d = 0; d < inc; d++) it[d] = 0;
          it[inc]++;
        end
        @(negedge clk);
        cycle = cycle + 1'b1;
      end
      checks++;
      if (issued != total) begin
        failures++;
        $display("FAIL issued %0d of %0d", issued, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
