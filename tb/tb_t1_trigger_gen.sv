// tb_t1_trigger_gen: self-checking test of the T1 trigger serialiser.
// Hard word 101 and soft word 011. Each scenario applies trigger pulses at
// given cycles and compares twelve cycles of T1 with the expected bits:
// one word, back-to-back words, ignored triggers during a word, hard before
// soft in the same cycle. Also checks the forwarded clock is high while the
// system clock is low and low while it is high.
module tb_t1_trigger_gen;

  logic clk = 1'b0;
  logic rst;
  logic hard_trig, soft_trig;
  logic [2:0] hard_word, soft_word;
  logic t1, gem_clk, busy, hard_sent, soft_sent, ignored;

  int checks = 0, failures = 0;
  int ignored_cnt = 0, hard_cnt = 0, soft_cnt = 0;

  always #5 clk = ~clk;

  t1_trigger_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (ignored)   ignored_cnt++;
      if (hard_sent) hard_cnt++;
      if (soft_sent) soft_cnt++;
    end
  end

  // h/s: bit 11-i set means a hard/soft pulse in cycle i
  task automatic scenario(input logic [11:0] h, input logic [11:0] s,
                          input logic [11:0] expect_t1, input int expect_ignored,
                          input string name);
    logic [11:0] got;
    int ign0;
    ign0 = ignored_cnt;
    for (int i = 0; i < 12; i++) begin
      @(posedge clk);
      hard_trig <= h[11-i];
      soft_trig <= s[11-i];
      @(negedge clk);
      got[11-i] = t1;
    end
    @(posedge clk);
    hard_trig <= 1'b0;
    soft_trig <= 1'b0;
    repeat (3) @(posedge clk);
    check(got == expect_t1, $sformatf("%s: T1 %b expected %b", name, got, expect_t1));
    check(ignored_cnt - ign0 == expect_ignored,
          $sformatf("%s: %0d ignored, expected %0d", name, ignored_cnt - ign0, expect_ignored));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    rst = 1'b1;
    hard_trig = 0; soft_trig = 0;
    hard_word = 3'b101; soft_word = 3'b011;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // forwarded clock: launched from the falling edge
    for (int i = 0; i < 4; i++) begin
      @(posedge clk); #1;
      check(gem_clk == 1'b0, "CLK high while clock high");
      @(negedge clk); #1;
      check(gem_clk == 1'b1, "CLK low while clock low");
    end

    scenario(12'b1000_0000_0000, 12'b0, 12'b0101_0000_0000, 0, "hard");
    scenario(12'b0, 12'b1000_0000_0000, 12'b0011_0000_0000, 0, "soft");
    scenario(12'b1000_0000_0000, 12'b1000_0000_0000, 12'b0101_0000_0000, 1, "hard+soft");
    scenario(12'b1000_0000_0000, 12'b0100_0000_0000, 12'b0101_0000_0000, 1, "soft during hard");
    scenario(12'b1001_0000_0000, 12'b0, 12'b0101_1010_0000, 0, "hard 3 apart");
    scenario(12'b1010_0000_0000, 12'b0, 12'b0101_0000_0000, 1, "hard 2 apart");
    scenario(12'b1100_0000_0000, 12'b0, 12'b0101_0000_0000, 1, "hard 1 apart");
    scenario(12'b0100_0000_0000, 12'b1000_0000_0000, 12'b0011_0000_0000, 1, "hard during soft");
    check(hard_cnt == 7, $sformatf("hard words %0d", hard_cnt));
    check(soft_cnt == 2, $sformatf("soft words %0d", soft_cnt));

    // busy lasts one word (3 cycles)
    @(posedge clk);
    hard_trig <= 1'b1;
    @(posedge clk);
    hard_trig <= 1'b0;
    busy_cycles = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      if (busy) busy_cycles++;
    end
    check(busy_cycles == 3, $sformatf("busy for %0d cycles", busy_cycles));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
