// tb_gem_event_buffer: self-checking test of one channel's event buffer.
// Fills the 63-event buffer, checks that the 64th frame is dropped but still
// counted as sent, reads events back (size first, then the words) and
// compares them with a reference queue, checks that space freed by a read is
// reused, that empty pops are ignored, and, on a second instance with a small
// data FIFO, that a frame is dropped when the data FIFO lacks room.
module tb_gem_event_buffer;

  logic clk = 1'b0;
  logic rst;
  logic frame_start, frame_end, word_we;
  logic [3:0]  frame_words;
  logic [15:0] word;
  logic size_rd, data_rd;
  logic [15:0] data_q, data_q2;
  logic [5:0]  event_count, event_count2;
  logic [9:0]  data_count;
  logic [4:0]  data_count2;
  logic [3:0]  next_size, next_size2;
  logic [31:0] frames_sent, frames_sent2;
  logic        frame_dropped, frame_dropped2;

  int checks = 0, failures = 0;
  int drops = 0, drops2 = 0;

  always #5 clk = ~clk;

  gem_event_buffer dut (
    .clk, .rst, .frame_start, .frame_end, .frame_words, .word_we, .word,
    .size_rd, .data_rd, .data_q, .event_count, .data_count, .next_size,
    .frames_sent, .frame_dropped
  );

  // small data FIFO: room for only two 12-word frames
  gem_event_buffer #(.DATA_DEPTH(32)) dut_small (
    .clk, .rst, .frame_start, .frame_end, .frame_words, .word_we, .word,
    .size_rd(1'b0), .data_rd(1'b0), .data_q(data_q2), .event_count(event_count2),
    .data_count(data_count2), .next_size(next_size2), .frames_sent(frames_sent2),
    .frame_dropped(frame_dropped2)
  );

  always @(posedge clk) begin
    if (!rst && frame_dropped)  drops++;
    if (!rst && frame_dropped2) drops2++;
  end

  typedef logic [15:0] word_q_t[$];
  word_q_t ref_events[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Present a frame of n words as the receiver would; keep it in the
  // reference only if expect_keep.
  task automatic push_frame(input int n, input bit expect_keep);
    word_q_t ev;
    @(posedge clk);
    frame_start <= 1'b1;
    @(posedge clk);
    frame_start <= 1'b0;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      ev.push_back(w);
      @(posedge clk);
      word_we <= 1'b1;
      word    <= w;
      // last word comes together with frame_end
      if (i == n - 1) begin
        frame_end   <= 1'b1;
        frame_words <= 4'(n);
      end
      @(posedge clk);
      word_we   <= 1'b0;
      frame_end <= 1'b0;
    end
    if (expect_keep) ref_events.push_back(ev);
    repeat (2) @(posedge clk);
  endtask

  task automatic read_event();
    word_q_t ev;
    logic [3:0] sz;
    @(negedge clk);
    sz = next_size;
    ev = ref_events.pop_front();
    check(sz == 4'(ev.size()), $sformatf("event size %0d expected %0d", sz, ev.size()));
    size_rd = 1'b1;
    @(negedge clk);
    size_rd = 1'b0;
    for (int i = 0; i < sz; i++) begin
      data_rd = 1'b1;
      @(negedge clk);
      data_rd = 1'b0;
      check(data_q == ev[i], $sformatf("data %h expected %h", data_q, ev[i]));
      @(negedge clk);
    end
  endtask

  function automatic int ref_words();
    int s = 0;
    foreach (ref_events[i]) s += ref_events[i].size();
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    frame_start = 0; frame_end = 0; word_we = 0; frame_words = 0; word = 0;
    size_rd = 0; data_rd = 0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;

    // empty: nothing to pop
    @(negedge clk);
    check(next_size == 0 && event_count == 0, "not empty after reset");
    size_rd = 1'b1; data_rd = 1'b1;
    @(negedge clk);
    size_rd = 1'b0; data_rd = 1'b0;
    check(event_count == 0 && data_count == 0, "empty pop changed counts");

    // fill the 63 events
    for (int k = 0; k < 63; k++) push_frame(12, 1);
    @(negedge clk);
    check(event_count == 63, $sformatf("event_count %0d", event_count));
    check(data_count == 756, $sformatf("data_count %0d", data_count));
    check(frames_sent == 63, "frames_sent after fill");
    check(drops == 0, "drop while filling");
    // the small instance kept only two frames
    check(event_count2 == 2 && data_count2 == 24, "small buffer counts");
    check(drops2 == 61, $sformatf("small buffer drops %0d", drops2));
    check(frames_sent2 == 63, "small buffer frames_sent");

    // 64th frame: buffer full, dropped but counted
    push_frame(12, 0);
    @(negedge clk);
    check(drops == 1, "64th frame not dropped");
    check(event_count == 63 && data_count == 756, "counts changed by dropped frame");
    check(frames_sent == 64, "dropped frame not counted as sent");

    // read two events, then frames of other sizes fit again
    read_event();
    read_event();
    @(negedge clk);
    check(event_count == 61 && data_count == 732, "counts after two reads");
    push_frame(3, 1);
    push_frame(12, 1);
    @(negedge clk);
    check(event_count == 63, "freed slots not reused");
    check(int'(data_count) == ref_words(), "data_count vs reference");

    // drain everything and compare
    while (ref_events.size() != 0) read_event();
    @(negedge clk);
    check(event_count == 0 && data_count == 0, "not empty after drain");
    check(frames_sent == 66, "frames_sent total");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
