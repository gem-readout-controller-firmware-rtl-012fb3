// tb_gem_rate_workload: the controller under a sustained trigger rate, with
// a polling readout CPU running at the same time.
//
// Twelve GEM front-end models answer every hard trigger with a 192-bit
// frame. NIM triggers arrive at random intervals around a mean rate; the
// CPU model polls FIFOSize of each channel in turn and reads every buffered
// event (EventSize, then the words), each register access taking
// ACCESS_CYCLES clocks, which models single-cycle VME reads without DMA
// (1 us per access at 32 MHz is this testbench's assumption).
//
// Phase 1: 5.4 kHz average trigger rate. Every frame must be read, none
//          dropped, the words must carry the right channel and event tags,
//          and the data read per channel per second must equal
//          rate x 24 bytes.
// Phase 2: 7.5 kHz, more than the modelled CPU can read: the 63-event
//          buffers fill and frames are dropped; after the triggers stop and
//          the buffers drain, frames read plus frames dropped must equal the
//          frames-sent counters.
module tb_gem_rate_workload;
  import gem_pkg::*;

  localparam realtime HALF          = 15.625ns;   // 32 MHz
  localparam real     F_CLK         = 32.0e6;
  localparam int      ACCESS_CYCLES = 32;
  localparam int      N_TRIG_1      = 600;
  localparam int      N_TRIG_2      = 900;

  logic clk = 1'b0;
  logic rst;
  logic nim_trig_in;
  logic [31:0] port_a_in, port_c_out, port_e_out;
  logic [2:0]  board_id_d, board_id_e, board_id_f;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  logic bus_wr, bus_rd, bus_rvalid;

  always #(HALF) clk = ~clk;

  gem_readout_top dut (.*);

  function automatic int pin(input int ch);
    return (ch < 6) ? 2 * ch : 16 + 2 * (ch - 6);
  endfunction

  logic [31:0] gem_pins;
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
  assign port_a_in = gem_pins;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ CPU model
  task automatic bus_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge clk);
    bus_wr = 1'b0;
    repeat (ACCESS_CYCLES - 1) @(negedge clk);
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge clk);
    bus_rd = 1'b0;
    d = bus_rdata;
    repeat (ACCESS_CYCLES - 1) @(negedge clk);
  endtask

  int  events_read [NUM_GEM];
  int  last_tag    [NUM_GEM];
  longint bytes_read [NUM_GEM];
  int  max_buffered = 0;
  bit  strict_tags;          // no drops expected: tags must be consecutive
  bit  cpu_run = 1'b1;
  bit  cpu_go  = 1'b0;

  task automatic read_channel(input int c);
    logic [15:0] d, sz;
    int n;
    bus_read(16'(A_FIFO_SIZE + 2 * c), d);
    n = d[5:0];
    if (n > max_buffered) max_buffered = n;
    for (int k = 0; k < n; k++) begin
      bus_read(16'(A_EVENT_SIZE + 2 * c), sz);
      check(sz == 12, $sformatf("ch %0d event size %0d", c, sz));
      for (int i = 0; i < sz; i++) begin
        bus_read(16'(A_EVENT_DATA + 256 * c), d);
        check(d[15:12] == 4'(c) && d[10:8] == 3'b101 && d[3:0] == 4'(i),
              $sformatf("ch %0d word %0d = %h", c, i, d));
        if (i == 0) begin
          if (strict_tags)
            check(d[7:4] == 4'(last_tag[c] + 1),
                  $sformatf("ch %0d event tag %0d after %0d", c, d[7:4], last_tag[c]));
          last_tag[c] = d[7:4];
        end
      end
      events_read[c]++;
      bytes_read[c] += 2 * sz;
    end
  endtask

  initial begin
    wait (cpu_go);
    while (cpu_run)
      for (int c = 0; c < NUM_GEM; c++) read_channel(c);
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // triggers at random intervals, uniformly spread around the mean period
  task automatic trigger_run(input int n, input real rate_hz);
    int mean;
    mean = int'(F_CLK / rate_hz);
    for (int k = 0; k < n; k++) begin
      wait_cycles(mean / 2 + $urandom_range(0, mean) - 3);
      #3ns nim_trig_in = 1'b1;
      wait_cycles(3);
      #3ns nim_trig_in = 1'b0;
    end
  endtask

  function automatic int total_read();
    int s = 0;
    foreach (events_read[c]) s += events_read[c];
    return s;
  endfunction

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1c;
    longint b0 [NUM_GEM];
    int e0 [NUM_GEM];
    logic [15:0] h, l;

    rst = 1'b1; nim_trig_in = 1'b0;
    board_id_d = 0; board_id_e = 0; board_id_f = 0;
    bus_addr = 0; bus_wdata = 0; bus_wr = 0; bus_rd = 0;
    foreach (events_read[c]) begin
      events_read[c] = 0; bytes_read[c] = 0; last_tag[c] = 15;
    end
    strict_tags = 1'b1;
    wait_cycles(5);
    // hard word 101, set before the CPU model starts polling
    @(negedge clk);
    rst = 1'b0;
    bus_addr = A_TRIG_WORD; bus_wdata = 16'b101_000; bus_wr = 1'b1;
    @(negedge clk);
    bus_wr = 1'b0;
    cpu_go = 1'b1;

    // phase 1: 5.4 kHz
    t0 = $time;
    trigger_run(N_TRIG_1, 5.4e3);
    t1c = $time;
    wait_cycles(20_000);
    for (int c = 0; c < NUM_GEM; c++) begin
      check(events_read[c] == N_TRIG_1,
            $sformatf("5.4 kHz: ch %0d read %0d of %0d", c, events_read[c], N_TRIG_1));
      b0[c] = bytes_read[c];
      e0[c] = events_read[c];
    end
    begin
      real secs, bps;
      secs = real'(t1c - t0) * 1.0e-9;
      bps  = real'(bytes_read[0]) / secs;
      $display("5.4 kHz phase: %0d triggers in %0.4f s = %0.0f Hz, ch0 %0.0f bytes/s, max buffered %0d",
               N_TRIG_1, secs, N_TRIG_1 / secs, bps, max_buffered);
      check(bps > 0.97 * 24.0 * N_TRIG_1 / secs && bps < 1.03 * 24.0 * N_TRIG_1 / secs,
            "read bytes/s differs from rate x 24");
      check(max_buffered < 63, "buffer full at 5.4 kHz");
    end

    // phase 2: 7.5 kHz, more than the CPU model can read
    strict_tags = 1'b0;
    max_buffered = 0;
    trigger_run(N_TRIG_2, 7.5e3);
    // drain
    wait_cycles(400_000);
    cpu_run = 1'b0;
    wait_cycles(50_000);
    $display("7.5 kHz phase: max buffered %0d", max_buffered);
    check(max_buffered == 63, "buffer never filled at 7.5 kHz");
    for (int c = 0; c < NUM_GEM; c++) begin
      int sent, dropped;
      bus_read(16'(A_SENT_H + 2 * c), h);
      bus_read(16'(A_SENT_L + 2 * c), l);
      sent = int'({h, l});
      dropped = sent - events_read[c];
      check(sent == N_TRIG_1 + N_TRIG_2, $sformatf("ch %0d frames sent %0d", c, sent));
      check(dropped > 0, $sformatf("ch %0d no frame dropped at 7.5 kHz", c));
      if (c == 0) $display("ch0: sent %0d, read %0d, dropped %0d", sent, events_read[c], dropped);
      bus_read(16'(A_FIFO_SIZE + 2 * c), h);
      check(h == 0, "buffer not empty after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
