// tb_trigger_sync: self-checking test of the NIM trigger synchroniser.
// Applies trigger pulses of various widths at times unrelated to the clock
// and checks one single-cycle trig_rise per rising edge, the latency of
// three clock edges, and the synchronised level.
module tb_trigger_sync;

  logic clk = 1'b0;
  logic rst;
  logic trig_in;
  logic trig_level, trig_rise;

  int checks = 0, failures = 0;
  int rises = 0;
  int prev_rise = 0;

  always #5 clk = ~clk;

  trigger_sync dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (!rst) begin
      if (trig_rise) rises++;
      check(!(trig_rise && prev_rise), "trig_rise longer than one cycle");
      prev_rise = trig_rise;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    trig_in = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // latency: input rises 3 ns after an edge; the pulse is seen after
    // the third following edge
    for (int k = 0; k < 10; k++) begin
      int edges;
      int start_rises;
      edges = 0;
      start_rises = rises;
      #(1 + k % 8);
      trig_in = 1'b1;
      while (!trig_rise) begin
        @(posedge clk);
        edges++;
        @(negedge clk);
        if (edges > 10) break;
      end
      check(edges == 3, $sformatf("latency %0d edges", edges));
      check(trig_level == 1'b1, "level not high");
      // hold high for a random time, then low
      repeat (1 + $urandom_range(0, 5)) @(posedge clk);
      #2 trig_in = 1'b0;
      repeat (5) @(posedge clk);
      check(trig_level == 1'b0, "level not low");
      check(rises == start_rises + 1, $sformatf("pulses %0d", rises - start_rises));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
