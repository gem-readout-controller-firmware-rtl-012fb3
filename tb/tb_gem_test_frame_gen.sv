// tb_gem_test_frame_gen: self-checking test of the GEM test frame generator.
// Loads the sample frame A012 C345 E678 9ABC DEF0 1234 5678 9ABC DEF0 1234
// 5678 9ABC, starts it by software and checks 192 cycles of DATA_VALID with
// the bits in order (first word first, MSB first) and the two-cycle start
// latency; checks that a start during a frame is ignored, that the external
// trigger starts a frame only when enabled, and a random frame.
module tb_gem_test_frame_gen;

  logic clk = 1'b0;
  logic rst;
  logic soft_start, ext_trig, ext_en;
  logic [15:0] tx_word [12];
  logic tx_data, tx_valid, busy, started;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gem_test_frame_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Pulse soft or external start in cycle 0, optionally another soft start
  // in cycle again_at, record 400 cycles and compare.
  task automatic run(input bit use_ext, input int again_at, input bit expect_frame,
                     input string name);
    logic rec_v [400];
    logic rec_d [400];
    int first, len;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      soft_start <= (i == 0 && !use_ext) || (i == again_at);
      ext_trig   <= (i == 0 && use_ext);
      @(negedge clk);
      rec_v[i] = tx_valid;
      rec_d[i] = tx_data;
    end
    first = -1; len = 0;
    for (int i = 0; i < 400; i++) begin
      if (rec_v[i]) begin
        if (first < 0) first = i;
        len++;
      end
    end
    if (!expect_frame) begin
      check(len == 0, $sformatf("%s: unexpected frame", name));
      return;
    end
    check(first == 2, $sformatf("%s: first bit in cycle %0d", name, first));
    check(len == 192, $sformatf("%s: %0d valid cycles", name, len));
    if (first >= 0 && first + 192 <= 400) begin
      for (int i = 0; i < 192; i++) begin
        check(rec_v[first + i] == 1'b1, $sformatf("%s: valid gap at %0d", name, i));
        check(rec_d[first + i] == tx_word[i / 16][15 - i % 16],
              $sformatf("%s: bit %0d", name, i));
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    soft_start = 0; ext_trig = 0; ext_en = 0;
    tx_word = '{16'hA012, 16'hC345, 16'hE678, 16'h9ABC, 16'hDEF0, 16'h1234,
                16'h5678, 16'h9ABC, 16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC};
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    run(0, -1, 1, "soft start");
    run(0, 100, 1, "soft start with second start mid-frame");
    ext_en = 1'b0;
    run(1, -1, 0, "external trigger disabled");
    ext_en = 1'b1;
    run(1, -1, 1, "external trigger enabled");
    foreach (tx_word[i]) tx_word[i] = 16'($urandom);
    run(0, -1, 1, "random frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
