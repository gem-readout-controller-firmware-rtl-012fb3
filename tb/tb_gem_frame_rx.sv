// tb_gem_frame_rx: self-checking test of the GEM frame deserialiser.
// Sends a full 192-bit frame, a short frame ending in a partial word, a
// frame longer than 12 words and back-to-back frames, and compares the words
// and word counts with a reference built from the sent bits. Also checks the
// latency from the first bit on the pins to the first word.
module tb_gem_frame_rx;

  logic clk = 1'b0;
  logic rst;
  logic data_i, data_valid_i;
  logic frame_start, frame_end, word_we;
  logic [3:0]  frame_words;
  logic [15:0] word;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  gem_frame_rx dut (.*);

  // reference queue of expected words and counts
  logic [15:0] exp_words[$];
  int          exp_counts[$];
  int unsigned first_bit_cycle, first_word_cycle;
  int          starts = 0;
  bit          want_latency = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send n bits (bits[0] first), then gap idle cycles.
  task automatic send_frame(input logic bits[], input int gap);
    int n = bits.size();
    int nw = 0;
    logic [15:0] w;
    // reference
    for (int i = 0; i + 16 <= n && nw < 12; i += 16) begin
      for (int b = 0; b < 16; b++) w[15-b] = bits[i+b];
      exp_words.push_back(w);
      nw++;
    end
    if ((n % 16) != 0 && nw < 12 && n < 12 * 16) begin
      w = '0;
      for (int b = 0; b < n % 16; b++) w[15-b] = bits[(n/16)*16 + b];
      exp_words.push_back(w);
      nw++;
    end
    exp_counts.push_back(nw);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      if (i == 0) first_bit_cycle = cycle;
      data_valid_i <= 1'b1;
      data_i       <= bits[i];
    end
    for (int i = 0; i < gap; i++) begin
      @(posedge clk);
      data_valid_i <= 1'b0;
      data_i       <= 1'b0;
    end
  endtask

  task automatic random_frame(input int n, input int gap);
    logic bits[];
    bits = new[n];
    foreach (bits[i]) bits[i] = 1'($urandom);
    send_frame(bits, gap);
  endtask

  // monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (frame_start) starts++;
      if (word_we) begin
        if (want_latency) begin
          first_word_cycle = cycle;
          want_latency = 0;
        end
        if (exp_words.size() == 0) check(0, "unexpected word");
        else begin
          logic [15:0] e;
          e = exp_words.pop_front();
          check(word == e, $sformatf("word %h expected %h", word, e));
        end
      end
      if (frame_end) begin
        if (exp_counts.size() == 0) check(0, "unexpected frame_end");
        else begin
          int e;
          e = exp_counts.pop_front();
          check(frame_words == 4'(e), $sformatf("frame_words %0d expected %0d", frame_words, e));
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bits[];
    rst = 1'b1; data_i = 1'b0; data_valid_i = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // the documented sample frame A012 C345 E678 9ABC DEF0 1234 5678 9ABC ...
    begin
      logic [15:0] sample [12] = '{16'hA012, 16'hC345, 16'hE678, 16'h9ABC,
                                  16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC,
                                  16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC};
      bits = new[192];
      for (int i = 0; i < 192; i++) bits[i] = sample[i/16][15 - i%16];
      want_latency = 1;
      send_frame(bits, 3);
    end
    // first bit driven after edge N is sampled at N+1, processed into the
    // shift register; the 16th bit is sampled at N+16, the word written at
    // N+17 and observed by the monitor at edge N+18, 18 edges after N
    check(first_word_cycle - first_bit_cycle == 18,
          $sformatf("first word latency %0d", first_word_cycle - first_bit_cycle));

    random_frame(40, 2);     // 2 words + 8-bit partial word
    random_frame(16, 1);     // exactly one word
    random_frame(5, 1);      // only a partial word
    random_frame(230, 4);    // longer than 12 words: capped
    for (int k = 0; k < 6; k++) random_frame(192, 1);  // back to back
    repeat (10) @(posedge clk);
    check(exp_words.size() == 0, "words missing");
    check(exp_counts.size() == 0, "frame ends missing");
    check(starts == 11, $sformatf("frame_start count %0d", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
