// vme_regs: register file and address decoder of the GEM readout controller.
//
// The VME slave logic of the board turns A24/A32 D16 cycles into single-cycle
// strobes on a simple local bus: bus_addr is the 16-bit byte offset of the
// register, bus_wr/bus_rd are one-cycle strobes, bus_wdata the written word.
// Read data is on bus_rdata with bus_rvalid one cycle after bus_rd.
//
// Register map (byte offsets, all registers 16 bits):
//   0x0000 BoardID          RO  [2:0] slot D, [5:3] slot E, [8:6] slot F
//   0x0002 Revision         RO  [15:8] major, [7:0] minor
//   0x0004 Reset            WO  any write resets the module and registers
//   0x0010 GEMTxStart       WO  [0] send one test frame, [1] external trigger
//                               sends a test frame (enable, stored)
//   0x0012 GEMSoftTrig      WO  any write sends the soft T1 trigger word
//   0x0014 GEMTrigWord      WO  [2:0] soft word, [5:3] hard word
//   0x0016-0x002D GEMTxWord[11:0] WO  test frame words, word 0 sent first
//   0x0030-0x0047 FIFOSize[ch]  RO  [5:0] buffered events, [15:6] buffered words
//   0x0048-0x005F EventSize[ch] RO  [3:0] size of the next event; the read
//                               removes it from the EventSize FIFO
//   0x0080-0x0097 EventsSentH[ch] RO  frames sent [31:16]; the read also
//                               copies bits [15:0] into a holding register
//   0x00A0-0x00B7 EventsSentL[ch] RO  the holding register (any channel)
//   0x4000-0x4BFF EventsData    RO  256 bytes per channel; any read in a
//                               channel's window pops one word of its EventData FIFO
// Write-only and unmapped addresses read as 0. A read of EventSize or
// EventsData pops the channel's FIFO on the cycle of bus_rd.
//
// From the source material: every offset except GEMTxWord, every field, the
// side effects of the EventsSent registers. This design's own choices: the
// local bus, GEMTxWord at 0x0016 (after GEMTrigWord, which the list of
// registers also places at 0x0014), that an EventSize read pops its FIFO,
// one-cycle read latency, the pulse timing (control pulses come one cycle
// after the write) and all-zero defaults after reset.
module vme_regs
  import gem_pkg::*;
#(
  parameter int unsigned N_CH = NUM_GEM
) (
  input  logic               clk,
  input  logic               rst,
  // local bus
  input  logic [ADDR_W-1:0]  bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [WORD_W-1:0]  bus_wdata,
  output logic [WORD_W-1:0]  bus_rdata,
  output logic               bus_rvalid,
  // board identification (slots D, E, F)
  input  logic [2:0]         board_id_d,
  input  logic [2:0]         board_id_e,
  input  logic [2:0]         board_id_f,
  // channel status and readout
  input  gem_status_t        status [N_CH],
  input  logic [WORD_W-1:0]  data_q [N_CH],
  output logic [N_CH-1:0]    size_rd,
  output logic [N_CH-1:0]    data_rd,
  // control
  output logic               soft_reset,
  output logic               tx_start,
  output logic               tx_ext_en,
  output logic               soft_trig,
  output logic [TRIG_W-1:0]  soft_word,
  output logic [TRIG_W-1:0]  hard_word,
  output logic [WORD_W-1:0]  tx_word [FRAME_WORDS]
);

  // ---------------------------------------------------------------- decode
  typedef enum logic [3:0] {
    R_NONE, R_BOARD_ID, R_REVISION, R_RESET, R_TX_START, R_SOFT_TRIG,
    R_TRIG_WORD, R_TX_WORD, R_FIFO_SIZE, R_EVENT_SIZE, R_SENT_H, R_SENT_L,
    R_EVENT_DATA
  } reg_e;

  reg_e        sel;
  logic [3:0]  idx;   // channel or word index of an array register

  function automatic logic in_array(input logic [ADDR_W-1:0] a,
                                    input logic [ADDR_W-1:0] base,
                                    input int unsigned n);
    return (a >= base) && (a < base + ADDR_W'(2 * n));
  endfunction

  always_comb begin
    logic [ADDR_W-1:0] a;
    a   = {bus_addr[ADDR_W-1:1], 1'b0};
    sel = R_NONE;
    idx = '0;
    if      (a == A_BOARD_ID)  sel = R_BOARD_ID;
    else if (a == A_REVISION)  sel = R_REVISION;
    else if (a == A_RESET)     sel = R_RESET;
    else if (a == A_TX_START)  sel = R_TX_START;
    else if (a == A_SOFT_TRIG) sel = R_SOFT_TRIG;
    else if (a == A_TRIG_WORD) sel = R_TRIG_WORD;
    else if (in_array(a, A_TX_WORD, FRAME_WORDS)) begin
      sel = R_TX_WORD;    idx = 4'((a - A_TX_WORD) >> 1);
    end else if (in_array(a, A_FIFO_SIZE, N_CH)) begin
      sel = R_FIFO_SIZE;  idx = 4'((a - A_FIFO_SIZE) >> 1);
    end else if (in_array(a, A_EVENT_SIZE, N_CH)) begin
      sel = R_EVENT_SIZE; idx = 4'((a - A_EVENT_SIZE) >> 1);
    end else if (in_array(a, A_SENT_H, N_CH)) begin
      sel = R_SENT_H;     idx = 4'((a - A_SENT_H) >> 1);
    end else if (in_array(a, A_SENT_L, N_CH)) begin
      sel = R_SENT_L;     idx = 4'((a - A_SENT_L) >> 1);
    end else if (a >= A_EVENT_DATA &&
                 a < A_EVENT_DATA + ADDR_W'(DATA_SEG_BYTES * N_CH)) begin
      sel = R_EVENT_DATA; idx = 4'((32'(a) - 32'(A_EVENT_DATA)) / DATA_SEG_BYTES);
    end
  end

  // ---------------------------------------------------------------- pops
  always_comb begin
    size_rd = '0;
    data_rd = '0;
    if (bus_rd && sel == R_EVENT_SIZE) size_rd[idx] = 1'b1;
    if (bus_rd && sel == R_EVENT_DATA) data_rd[idx] = 1'b1;
  end

  // ---------------------------------------------------------------- reads
  logic [WORD_W-1:0] rd_val_q;
  logic              rd_data_q;   // answer comes from an EventData FIFO
  logic [3:0]        rd_idx_q;
  logic [WORD_W-1:0] sent_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_val_q   <= '0;
      rd_data_q  <= 1'b0;
      rd_idx_q   <= '0;
      bus_rvalid <= 1'b0;
      sent_hold  <= '0;
    end else begin
      bus_rvalid <= bus_rd;
      if (bus_rd) begin
        rd_data_q <= (sel == R_EVENT_DATA);
        rd_idx_q  <= idx;
        rd_val_q  <= '0;
        case (sel)
          R_BOARD_ID:   rd_val_q <= {7'b0, board_id_f, board_id_e, board_id_d};
          R_REVISION:   rd_val_q <= {REV_MAJOR, REV_MINOR};
          R_FIFO_SIZE:  rd_val_q <= {status[idx].data_count, status[idx].event_count};
          R_EVENT_SIZE: rd_val_q <= {12'b0, status[idx].next_size};
          R_SENT_H: begin
            rd_val_q  <= status[idx].frames_sent[31:16];
            sent_hold <= status[idx].frames_sent[15:0];
          end
          R_SENT_L:     rd_val_q <= sent_hold;
          default:      rd_val_q <= '0;
        endcase
      end
    end
  end

  assign bus_rdata = rd_data_q ? data_q[rd_idx_q] : rd_val_q;

  // ---------------------------------------------------------------- writes
  always_ff @(posedge clk) begin
    if (rst) begin
      soft_reset <= 1'b0;
      tx_start   <= 1'b0;
      tx_ext_en  <= 1'b0;
      soft_trig  <= 1'b0;
      soft_word  <= '0;
      hard_word  <= '0;
      for (int i = 0; i < FRAME_WORDS; i++) tx_word[i] <= '0;
    end else begin
      soft_reset <= 1'b0;
      tx_start   <= 1'b0;
      soft_trig  <= 1'b0;
      if (bus_wr) begin
        case (sel)
          R_RESET:     soft_reset <= 1'b1;
          R_TX_START: begin
            tx_start  <= bus_wdata[0];
            tx_ext_en <= bus_wdata[1];
          end
          R_SOFT_TRIG: soft_trig <= 1'b1;
          R_TRIG_WORD: begin
            soft_word <= bus_wdata[2:0];
            hard_word <= bus_wdata[5:3];
          end
          R_TX_WORD:   tx_word[idx] <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(bus_rd && bus_wr))
    else $error("bus_rd and bus_wr in the same cycle");

endmodule
