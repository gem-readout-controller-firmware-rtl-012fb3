// tb_vme_regs: self-checking test of the register file and address decoder.
// Reads BoardID and Revision, writes the control registers and checks the
// pulses and stored fields, writes the twelve test frame words, reads the
// per-channel FIFOSize, EventSize, EventsSent H/L and EventsData registers
// against values driven by the testbench, checks which FIFO each read pops,
// and checks the one-cycle read latency.
module tb_vme_regs;
  import gem_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  logic bus_wr, bus_rd, bus_rvalid;
  logic [2:0] board_id_d, board_id_e, board_id_f;
  gem_status_t status [NUM_GEM];
  logic [15:0] data_q [NUM_GEM];
  logic [NUM_GEM-1:0] size_rd, data_rd;
  logic soft_reset, tx_start, tx_ext_en, soft_trig;
  logic [2:0] soft_word, hard_word;
  logic [15:0] tx_word [FRAME_WORDS];

  int checks = 0, failures = 0;
  logic [15:0] next_data [NUM_GEM];
  logic [NUM_GEM-1:0] size_pops, data_pops;

  always #5 clk = ~clk;

  vme_regs dut (.*);

  // channel model: a data read returns the next value of a per-channel
  // sequence one cycle later
  always @(posedge clk) begin
    for (int c = 0; c < NUM_GEM; c++) begin
      if (data_rd[c]) begin
        data_q[c]    <= next_data[c];
        next_data[c] <= next_data[c] + 16'd1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus cycles are driven on the falling edge
  task automatic bus_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge clk);
    bus_wr = 1'b0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_addr = a; bus_rd = 1'b1;
    #1;
    size_pops = size_rd;
    data_pops = data_rd;
    @(negedge clk);
    bus_rd = 1'b0;
    check(bus_rvalid == 1'b1, "rvalid not one cycle after rd");
    d = bus_rdata;
    @(negedge clk);
    check(bus_rvalid == 1'b0, "rvalid longer than one cycle");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    rst = 1'b1;
    bus_addr = 0; bus_wdata = 0; bus_wr = 0; bus_rd = 0;
    board_id_d = 3'b010; board_id_e = 3'b001; board_id_f = 3'b011;
    for (int c = 0; c < NUM_GEM; c++) begin
      status[c].event_count = 6'(c + 1);
      status[c].data_count  = 10'(12 * (c + 1));
      status[c].next_size   = 4'(c);
      status[c].frames_sent = 32'h0001_0000 * (c + 3) + 32'(c * 7 + 5);
      next_data[c] = 16'(c * 16'h1000);
      data_q[c] = '0;
    end
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // identification
    bus_read(16'h0000, d);
    check(d == 16'b0000000_011_001_010, $sformatf("BoardID %h", d));
    bus_read(16'h0002, d);
    check(d == 16'h0100, $sformatf("Revision %h", d));

    // trigger words and soft trigger
    bus_write(16'h0014, 16'b101_011);
    check(soft_word == 3'b011 && hard_word == 3'b101, "GEMTrigWord fields");
    bus_read(16'h0014, d);
    check(d == 16'h0000, "write-only register reads 0");
    fork
      bus_write(16'h0012, 16'hFFFF);
      begin
        int n;
        n = 0;
        repeat (4) begin @(posedge clk); #1; if (soft_trig) n++; end
        check(n == 1, $sformatf("soft_trig pulse %0d cycles", n));
      end
    join

    // test frame control
    fork
      bus_write(16'h0010, 16'h0003);
      begin
        int n;
        n = 0;
        repeat (4) begin @(posedge clk); #1; if (tx_start) n++; end
        check(n == 1, $sformatf("tx_start pulse %0d cycles", n));
      end
    join
    check(tx_ext_en == 1'b1, "external test frame enable not set");
    bus_write(16'h0010, 16'h0000);
    check(tx_ext_en == 1'b0, "external test frame enable not cleared");

    // test frame words
    for (int i = 0; i < FRAME_WORDS; i++) bus_write(16'(16'h0016 + 2 * i), 16'(16'hA000 + i));
    for (int i = 0; i < FRAME_WORDS; i++)
      check(tx_word[i] == 16'(16'hA000 + i), $sformatf("GEMTxWord[%0d] %h", i, tx_word[i]));

    // per-channel status
    for (int c = 0; c < NUM_GEM; c++) begin
      bus_read(16'(16'h0030 + 2 * c), d);
      check(d == {status[c].data_count, status[c].event_count},
            $sformatf("FIFOSize[%0d] %h", c, d));
      check(size_pops == 0 && data_pops == 0, "FIFOSize read popped a FIFO");
      bus_read(16'(16'h0048 + 2 * c), d);
      check(d == 16'(c), $sformatf("EventSize[%0d] %h", c, d));
      check(size_pops == NUM_GEM'(1) << c && data_pops == 0,
            $sformatf("EventSize[%0d] popped %b", c, size_pops));
    end

    // frames sent: H latches L into the common holding register
    for (int c = NUM_GEM - 1; c >= 0; c--) begin
      logic [15:0] h, l;
      bus_read(16'(16'h0080 + 2 * c), h);
      // a different channel's L address still returns the held value
      bus_read(16'(16'h00A0 + 2 * ((c + 5) % NUM_GEM)), l);
      check({h, l} == status[c].frames_sent,
            $sformatf("EventsSent[%0d] %h%h", c, h, l));
    end

    // event data windows: any offset inside a channel's 256 bytes
    for (int k = 0; k < 60; k++) begin
      int c;
      logic [15:0] e;
      c = $urandom_range(0, NUM_GEM - 1);
      e = next_data[c];
      bus_read(16'(16'h4000 + 256 * c + 2 * $urandom_range(0, 127)), d);
      check(d == e, $sformatf("EventsData[%0d] %h expected %h", c, d, e));
      check(data_pops == NUM_GEM'(1) << c && size_pops == 0,
            $sformatf("EventsData[%0d] popped %b", c, data_pops));
    end
    // just past the last window: nothing popped
    bus_read(16'h4C00, d);
    check(data_pops == 0 && d == 0, "read past EventsData popped");

    // reset register
    fork
      bus_write(16'h0004, 16'h0000);
      begin
        int n;
        n = 0;
        repeat (4) begin @(posedge clk); #1; if (soft_reset) n++; end
        check(n == 1, $sformatf("soft_reset pulse %0d cycles", n));
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
