// gem_readout_top: GEM readout controller for a VME board with a user FPGA
// and three 32-channel LVDS/NIM ports.
//
// Twelve GEM front-end modules each get a T1 trigger line and a clock (port C)
// and each send back 192-bit frames on a DATA/DATA_VALID pair (port A). Every
// channel deserialises its frames (gem_frame_rx) into a 63-event buffer
// (gem_event_buffer), which the VME CPU polls and reads through a D16
// register map (vme_regs). Triggers come from the NIM trigger input (hard,
// via trigger_sync) or from a register write (soft) and are sent as a 3-bit
// word on all T1 lines (t1_trigger_gen). A test frame generator
// (gem_test_frame_gen) drives the same 192-bit frame on all 12 DATA/DATA_VALID
// outputs of port E, which a loopback cable can feed into port A.
//
// Ports: clk is the 32 MHz system clock (the reference input of port G,
// channel 0, passed through the board's x1 PLL, which is outside this RTL);
// rst is the power-on reset; nim_trig_in is port G channel 1. port_a_in,
// port_c_out and port_e_out are the 32 single-ended channels of the LVDS
// ports, after/before the LVDS buffers. The bus_* signals are the local bus
// of the board's VME interface (see vme_regs). A write of the Reset register
// resets all of the logic for one cycle.
//
// Channel-to-pin map (following the board pinout): GEM channels 0-5
// (GEM1A-F) use pins 2k and 2k+1, channels 6-11 (GEM2A-F) pins 16+2k and
// 17+2k; pins 12-15 and 28-31 are unused (outputs driven 0). The even pin
// carries DATA_VALID (port A, port E) or T1 (port C), the odd pin DATA or CLK.
// That GEM channel k is the k-th GEM of this list is this design's reading.
//
// The status pulses of the trigger, test frame and buffer blocks (busy,
// sent, ignored, dropped) are left open here: software sees the same facts
// through the T1 lines and the frames-sent and FIFO counters.
module gem_readout_top
  import gem_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               nim_trig_in,
  input  logic [31:0]        port_a_in,
  output logic [31:0]        port_c_out,
  output logic [31:0]        port_e_out,
  input  logic [2:0]         board_id_d,
  input  logic [2:0]         board_id_e,
  input  logic [2:0]         board_id_f,
  input  logic [ADDR_W-1:0]  bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [WORD_W-1:0]  bus_wdata,
  output logic [WORD_W-1:0]  bus_rdata,
  output logic               bus_rvalid
);

  // even pin of GEM channel ch
  function automatic int unsigned pin_of(input int unsigned ch);
    return (ch < NUM_GEM / 2) ? 2 * ch : 16 + 2 * (ch - NUM_GEM / 2);
  endfunction

  logic rst_int, soft_reset;
  assign rst_int = rst || soft_reset;

  // ------------------------------------------------------------ registers
  gem_status_t       status  [NUM_GEM];
  logic [WORD_W-1:0] data_q  [NUM_GEM];
  logic [NUM_GEM-1:0] size_rd, data_rd;
  logic              tx_start, tx_ext_en, soft_trig;
  logic [TRIG_W-1:0] soft_word, hard_word;
  logic [WORD_W-1:0] tx_word [FRAME_WORDS];

  vme_regs u_regs (
    .clk        (clk),
    .rst        (rst_int),
    .bus_addr   (bus_addr),
    .bus_wr     (bus_wr),
    .bus_rd     (bus_rd),
    .bus_wdata  (bus_wdata),
    .bus_rdata  (bus_rdata),
    .bus_rvalid (bus_rvalid),
    .board_id_d (board_id_d),
    .board_id_e (board_id_e),
    .board_id_f (board_id_f),
    .status     (status),
    .data_q     (data_q),
    .size_rd    (size_rd),
    .data_rd    (data_rd),
    .soft_reset (soft_reset),
    .tx_start   (tx_start),
    .tx_ext_en  (tx_ext_en),
    .soft_trig  (soft_trig),
    .soft_word  (soft_word),
    .hard_word  (hard_word),
    .tx_word    (tx_word)
  );

  // ------------------------------------------------------------ triggers
  logic trig_rise;
  logic t1, gem_clk;

  trigger_sync u_trig_sync (
    .clk        (clk),
    .rst        (rst_int),
    .trig_in    (nim_trig_in),
    .trig_level (),
    .trig_rise  (trig_rise)
  );

  t1_trigger_gen u_t1 (
    .clk       (clk),
    .rst       (rst_int),
    .hard_trig (trig_rise),
    .soft_trig (soft_trig),
    .hard_word (hard_word),
    .soft_word (soft_word),
    .t1        (t1),
    .gem_clk   (gem_clk),
    .busy      (),
    .hard_sent (),
    .soft_sent (),
    .ignored   ()
  );

  // ------------------------------------------------------------ test frame
  logic tx_data, tx_valid;

  gem_test_frame_gen u_txgen (
    .clk        (clk),
    .rst        (rst_int),
    .soft_start (tx_start),
    .ext_trig   (trig_rise),
    .ext_en     (tx_ext_en),
    .tx_word    (tx_word),
    .tx_data    (tx_data),
    .tx_valid   (tx_valid),
    .busy       (),
    .started    ()
  );

  // ------------------------------------------------------------ channels
  for (genvar ch = 0; ch < NUM_GEM; ch++) begin : gen_ch
    localparam int unsigned P = pin_of(ch);

    logic              frame_start, frame_end, word_we;
    logic [3:0]        frame_words;
    logic [WORD_W-1:0] word;

    gem_frame_rx #(
      .WORD_W    (WORD_W),
      .MAX_WORDS (FRAME_WORDS)
    ) u_rx (
      .clk          (clk),
      .rst          (rst_int),
      .data_i       (port_a_in[P+1]),
      .data_valid_i (port_a_in[P]),
      .frame_start  (frame_start),
      .frame_end    (frame_end),
      .frame_words  (frame_words),
      .word_we      (word_we),
      .word         (word)
    );

    gem_event_buffer #(
      .WORD_W      (WORD_W),
      .EVENT_DEPTH (EVENT_DEPTH),
      .MAX_WORDS   (FRAME_WORDS)
    ) u_buf (
      .clk           (clk),
      .rst           (rst_int),
      .frame_start   (frame_start),
      .frame_end     (frame_end),
      .frame_words   (frame_words),
      .word_we       (word_we),
      .word          (word),
      .size_rd       (size_rd[ch]),
      .data_rd       (data_rd[ch]),
      .data_q        (data_q[ch]),
      .event_count   (status[ch].event_count),
      .data_count    (status[ch].data_count),
      .next_size     (status[ch].next_size),
      .frames_sent   (status[ch].frames_sent),
      .frame_dropped ()
    );
  end

  // ------------------------------------------------------------ pins
  always_comb begin
    port_c_out = '0;
    port_e_out = '0;
    for (int ch = 0; ch < NUM_GEM; ch++) begin
      port_c_out[pin_of(ch)]     = t1;
      port_c_out[pin_of(ch) + 1] = gem_clk;
      port_e_out[pin_of(ch)]     = tx_valid;
      port_e_out[pin_of(ch) + 1] = tx_data;
    end
  end

endmodule
