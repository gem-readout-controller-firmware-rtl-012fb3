// tb_gem_readout_top: end-to-end test of the GEM readout controller with
// every parameter at its default (12 channels, 63-event buffers, 192-bit
// frames, 1024-word data FIFOs).
//
// Port A is fed either from port E (the loopback cable used with the test
// frame generator) or from twelve GEM front-end models driven by port C
// (T1 and CLK). A readout task plays the part of the VME CPU: it polls the
// FIFOSize registers, reads each event's size, then its words. Phases:
//   1. identification registers
//   2. soft test frame through the loopback, read on all 12 channels
//   3. external (NIM) trigger: hard T1 word on all T1 pins and a test frame
//   4. soft T1 trigger; two NIM edges 2 cycles apart send only one word
//   5. GEM models answer hard and soft triggers; per-channel data checked,
//      which also checks the channel-to-pin map
//   6. overflow: 70 test frames without readout; 63 kept, 7 dropped, the
//      frames-sent counters (EventsSent H/L) count all 70
//   7. drain and check, then the Reset register clears everything
// Every mechanism is counted and one that never happened is a failure.
module tb_gem_readout_top;
  import gem_pkg::*;

  localparam realtime HALF = 15.625ns;   // 32 MHz

  logic clk = 1'b0;
  logic rst;
  logic nim_trig_in;
  logic [31:0] port_a_in, port_c_out, port_e_out;
  logic [2:0]  board_id_d, board_id_e, board_id_f;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  logic bus_wr, bus_rd, bus_rvalid;

  always #(HALF) clk = ~clk;

  gem_readout_top dut (.*);

  // ------------------------------------------------------------ GEM side
  logic loopback;
  logic [31:0] gem_pins;

  function automatic int pin(input int ch);
    return (ch < 6) ? 2 * ch : 16 + 2 * (ch - 6);
  endfunction

  for (genvar c = 0; c < NUM_GEM; c++) begin : gen_gem
    gem_frontend_model #(.CH(c)) u_gem (
      .gem_clk    (port_c_out[pin(c) + 1]),
      .t1         (port_c_out[pin(c)]),
      .data       (gem_pins[pin(c) + 1]),
      .data_valid (gem_pins[pin(c)])
    );
  end

  always_comb begin
    gem_pins[15:12] = '0;
    gem_pins[31:28] = '0;
  end

  assign port_a_in = loopback ? port_e_out : gem_pins;

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int n_soft_tx = 0, n_ext_tx = 0, n_hard_t1 = 0, n_soft_t1 = 0;
  int n_ignored = 0, n_dropped = 0, n_events_read = 0, n_latch = 0;
  int n_reset = 0, n_gem_frames = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // T1 monitor on channel 0, decoding words as the GEM models do; all T1
  // and CLK pins must carry the same signal, unused pins stay low
  logic [2:0] t1_words [$];
  int t1_bits = 0;
  logic [2:0] t1_sh;
  always @(posedge port_c_out[1]) begin
    if (!rst) begin
      for (int c = 1; c < NUM_GEM; c++)
        if (port_c_out[pin(c)] != port_c_out[0]) check(0, "T1 pins differ");
      if (t1_bits == 0) begin
        if (port_c_out[0]) begin t1_sh = 3'b001; t1_bits = 1; end
      end else begin
        t1_sh = {t1_sh[1:0], port_c_out[0]};
        t1_bits++;
        if (t1_bits == 3) begin
          t1_words.push_back(t1_sh);
          t1_bits = 0;
        end
      end
    end
  end
  always @(negedge clk) begin
    if (!rst) begin
      if ((port_c_out & 32'hF000_F000) != 0 || (port_e_out & 32'hF000_F000) != 0)
        check(0, "unused pin driven");
      for (int c = 1; c < NUM_GEM; c++)
        if (port_c_out[pin(c) + 1] != port_c_out[1] ||
            port_e_out[pin(c)] != port_e_out[0] ||
            port_e_out[pin(c) + 1] != port_e_out[1])
          check(0, "port C/E pins differ between channels");
    end
  end

  // ------------------------------------------------------------ bus tasks
  task automatic bus_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge clk);
    bus_wr = 1'b0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge clk);
    bus_rd = 1'b0;
    check(bus_rvalid, "no rvalid");
    d = bus_rdata;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic nim_pulse(input int width);
    @(posedge clk);
    #3ns nim_trig_in = 1'b1;
    repeat (width) @(posedge clk);
    #3ns nim_trig_in = 1'b0;
  endtask

  // Read one event of channel ch and return its words.
  typedef logic [15:0] words_t[$];
  task automatic read_event(input int ch, output words_t ev);
    logic [15:0] sz, d;
    ev = {};
    bus_read(16'(A_EVENT_SIZE + 2 * ch), sz);
    for (int i = 0; i < sz; i++) begin
      bus_read(16'(A_EVENT_DATA + 256 * ch), d);
      ev.push_back(d);
    end
    n_events_read++;
  endtask

  task automatic fifo_size(input int ch, output int events, output int words);
    logic [15:0] d;
    bus_read(16'(A_FIFO_SIZE + 2 * ch), d);
    events = d[5:0];
    words  = d[15:6];
  endtask

  task automatic frames_sent(input int ch, output logic [31:0] v);
    logic [15:0] h, l;
    bus_read(16'(A_SENT_H + 2 * ch), h);
    bus_read(16'(A_SENT_L + 2 * ch), l);
    v = {h, l};
    n_latch++;
  endtask

  logic [15:0] sample [12] = '{16'hA012, 16'hC345, 16'hE678, 16'h9ABC,
                              16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC,
                              16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC};

  // Read an event from every channel and compare with the sample frame.
  task automatic read_sample_all(input string what);
    words_t ev;
    for (int c = 0; c < NUM_GEM; c++) begin
      read_event(c, ev);
      check(ev.size() == 12, $sformatf("%s: ch %0d size %0d", what, c, ev.size()));
      for (int i = 0; i < ev.size() && i < 12; i++)
        check(ev[i] == sample[i], $sformatf("%s: ch %0d word %0d %h", what, c, i, ev[i]));
    end
  endtask

  task automatic expect_counts(input int events, input string what);
    int e, w;
    for (int c = 0; c < NUM_GEM; c++) begin
      fifo_size(c, e, w);
      check(e == events && w == 12 * events,
            $sformatf("%s: ch %0d FIFOSize %0d events %0d words", what, c, e, w));
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic [31:0] s;
    words_t ev;
    int e, w, nw;

    rst = 1'b1; nim_trig_in = 1'b0; loopback = 1'b1;
    board_id_d = 3'b010; board_id_e = 3'b000; board_id_f = 3'b011;
    bus_addr = 0; bus_wdata = 0; bus_wr = 0; bus_rd = 0;
    wait_cycles(5);
    rst <= 1'b0;
    wait_cycles(3);

    // 1. identification
    bus_read(A_BOARD_ID, d);
    check(d == {7'b0, 3'b011, 3'b000, 3'b010}, $sformatf("BoardID %h", d));
    bus_read(A_REVISION, d);
    check(d == 16'h0100, $sformatf("Revision %h", d));
    expect_counts(0, "after reset");

    // set up: soft word 110, hard word 101, the sample test frame
    bus_write(A_TRIG_WORD, {10'b0, 3'b101, 3'b110});
    for (int i = 0; i < 12; i++) bus_write(16'(A_TX_WORD + 2 * i), sample[i]);

    // 2. soft test frame through the loopback
    bus_write(A_TX_START, 16'h0001);
    n_soft_tx++;
    wait_cycles(220);
    expect_counts(1, "soft test frame");
    read_sample_all("soft test frame");
    expect_counts(0, "after read");

    // 3. external trigger: hard T1 word and a test frame
    bus_write(A_TX_START, 16'h0002);
    t1_words = {};
    nim_pulse(4);
    n_ext_tx++;
    wait_cycles(220);
    check(t1_words.size() == 1 && t1_words[0] == 3'b101, "hard T1 word");
    if (t1_words.size() == 1 && t1_words[0] == 3'b101) n_hard_t1++;
    expect_counts(1, "external test frame");
    read_sample_all("external test frame");
    bus_write(A_TX_START, 16'h0000);   // external start off again

    // 4. soft T1 word; NIM edges 2 cycles apart give a single word
    t1_words = {};
    bus_write(A_SOFT_TRIG, 16'h0000);
    wait_cycles(10);
    check(t1_words.size() == 1 && t1_words[0] == 3'b110, "soft T1 word");
    if (t1_words.size() == 1) n_soft_t1++;
    t1_words = {};
    @(posedge clk);
    #3ns nim_trig_in = 1'b1;
    @(posedge clk);
    #3ns nim_trig_in = 1'b0;
    @(posedge clk);
    #3ns nim_trig_in = 1'b1;
    @(posedge clk);
    #3ns nim_trig_in = 1'b0;
    wait_cycles(10);
    check(t1_words.size() == 1, $sformatf("close NIM edges gave %0d words", t1_words.size()));
    if (t1_words.size() == 1) n_ignored++;
    // no frame should have been sent (external start is off)
    expect_counts(0, "no test frame");

    // 5. GEM front-end models answer T1 words (the 3 words sent so far in
    //    phases 3-4 were seen by the models while loopback was on; their
    //    answers reached nobody). Flush, then switch the inputs over.
    wait_cycles(400);
    loopback = 1'b0;
    begin
      int base [NUM_GEM];
      for (int c = 0; c < NUM_GEM; c++) base[c] = 3;  // frames already sent by each model
      nim_pulse(3);                      // hard word 101
      wait_cycles(300);
      bus_write(A_SOFT_TRIG, 16'h0000);  // soft word 110
      wait_cycles(300);
      for (int c = 0; c < NUM_GEM; c++) begin
        fifo_size(c, e, w);
        check(e == 2 && w == 24, $sformatf("GEM ch %0d FIFOSize %0d/%0d", c, e, w));
        for (int k = 0; k < 2; k++) begin
          logic [2:0] tw;
          tw = (k == 0) ? 3'b101 : 3'b110;
          read_event(c, ev);
          check(ev.size() == 12, $sformatf("GEM ch %0d size %0d", c, ev.size()));
          for (int i = 0; i < ev.size(); i++)
            check(ev[i] == {4'(c), 1'b0, tw, 4'(base[c] + k), 4'(i)},
                  $sformatf("GEM ch %0d event %0d word %0d = %h", c, k, i, ev[i]));
          n_gem_frames++;
        end
      end
    end
    loopback = 1'b1;
    wait_cycles(5);

    // 6. overflow: 70 frames, no readout
    for (int k = 0; k < 70; k++) begin
      bus_write(A_TX_START, 16'h0001);
      wait_cycles(196);
    end
    wait_cycles(10);
    for (int c = 0; c < NUM_GEM; c++) begin
      fifo_size(c, e, w);
      check(e == 63 && w == 756, $sformatf("full ch %0d FIFOSize %0d/%0d", c, e, w));
      frames_sent(c, s);
      // 1 + 1 loopback frames, 2 GEM frames (phase 5), 70 now; GEM answers
      // during loopback phases never reached port A
      check(s == 32'd74, $sformatf("ch %0d EventsSent %0d", c, s));
      nw = int'(s) - 4 - 63;             // frames of this phase not kept
      if (c == 0 && nw == 7) n_dropped += nw;
    end

    // 7. drain everything, in channel order as a readout routine would
    for (int c = 0; c < NUM_GEM; c++) begin
      fifo_size(c, e, w);
      for (int k = 0; k < e; k++) begin
        read_event(c, ev);
        check(ev.size() == 12, "drain size");
        for (int i = 0; i < ev.size() && i < 12; i++)
          check(ev[i] == sample[i], $sformatf("drain ch %0d word %0d %h", c, i, ev[i]));
      end
    end
    expect_counts(0, "after drain");
    // one more frame fits after the drain
    bus_write(A_TX_START, 16'h0001);
    wait_cycles(220);
    expect_counts(1, "after drain, new frame");

    // Reset register: buffers, counters and trigger words cleared
    bus_write(A_RESET, 16'h0000);
    n_reset++;
    wait_cycles(3);
    expect_counts(0, "after soft reset");
    frames_sent(5, s);
    check(s == 0, "EventsSent not cleared by reset");
    t1_words = {};
    bus_write(A_SOFT_TRIG, 16'h0000);   // soft word is 000 now: no visible word
    wait_cycles(10);
    check(t1_words.size() == 0, "trigger word not cleared by reset");

    // every mechanism must have happened
    check(n_soft_tx > 0,     "no soft test frame");
    check(n_ext_tx > 0,      "no external test frame");
    check(n_hard_t1 > 0,     "no hard T1 word");
    check(n_soft_t1 > 0,     "no soft T1 word");
    check(n_ignored > 0,     "no ignored trigger");
    check(n_dropped > 0,     "no dropped frame");
    check(n_events_read > 0, "no event read");
    check(n_latch > 0,       "no EventsSent latch");
    check(n_reset > 0,       "no soft reset");
    check(n_gem_frames > 0,  "no GEM model frame");
    $display("mechanisms: soft_tx=%0d ext_tx=%0d hard_t1=%0d soft_t1=%0d ignored=%0d dropped=%0d events_read=%0d latch=%0d reset=%0d gem_frames=%0d",
             n_soft_tx, n_ext_tx, n_hard_t1, n_soft_t1, n_ignored, n_dropped,
             n_events_read, n_latch, n_reset, n_gem_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
