// gem_frame_rx: deserialiser for one GEM DATA/DATA_VALID input stream.
//
// A GEM module sends a frame as a run of consecutive clock cycles with
// DATA_VALID high, one DATA bit per cycle, most significant bit of the first
// 16-bit word first. A normal frame is 192 bits, i.e. 12 words. Both inputs
// are synchronous to the 32 MHz system clock and are first captured in an
// input register (the cable-length tuning of setup/hold happens outside).
//
// Every 16 received bits give one word on word_we/word. The frame ends on the
// first cycle with DATA_VALID low; a trailing group of fewer than 16 bits is
// then written as one more word, left-aligned and zero-filled. At most
// MAX_WORDS words are written per frame; further bits are discarded. The
// frame_start pulse marks the first bit, frame_end the end of the frame with
// frame_words the number of words written for it.
//
// Timing: outputs are registered; a bit on the pins in cycle t is in the
// input register at t+1 and its effect on the outputs is visible at t+2. The
// last word of a frame and frame_end may come in the same cycle. Two frames
// must be separated by at least one cycle of DATA_VALID low.
//
// From the source material: the 192-bit frame of 12 x 16-bit words and the
// DATA/DATA_VALID pair. This design's own choices: MSB-first bit order within
// a word, the end-of-frame rule, the handling of short and long frames.
module gem_frame_rx #(
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned MAX_WORDS = 12,
  parameter int unsigned CNT_W     = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              data_i,        // GEM DATA pin
  input  logic              data_valid_i,  // GEM DATA_VALID pin
  output logic              frame_start,
  output logic              frame_end,
  output logic [CNT_W-1:0]  frame_words,
  output logic              word_we,
  output logic [WORD_W-1:0] word
);

  localparam int unsigned BIT_W = $clog2(WORD_W);

  logic              d_q, dv_q, dv_prev;
  logic [WORD_W-1:0] shreg;
  logic [BIT_W-1:0]  bit_cnt;
  logic [CNT_W-1:0]  word_cnt;

  // input capture register
  always_ff @(posedge clk) begin
    if (rst) begin
      d_q     <= 1'b0;
      dv_q    <= 1'b0;
      dv_prev <= 1'b0;
    end else begin
      d_q     <= data_i;
      dv_q    <= data_valid_i;
      dv_prev <= dv_q;
    end
  end

  logic room;
  assign room = (word_cnt < CNT_W'(MAX_WORDS));

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg       <= '0;
      bit_cnt     <= '0;
      word_cnt    <= '0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      frame_words <= '0;
      word_we     <= 1'b0;
      word        <= '0;
    end else begin
      frame_start <= dv_q && !dv_prev;
      frame_end   <= 1'b0;
      word_we     <= 1'b0;
      if (dv_q) begin
        shreg   <= {shreg[WORD_W-2:0], d_q};
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == BIT_W'(WORD_W-1) && room) begin
          word_we  <= 1'b1;
          word     <= {shreg[WORD_W-2:0], d_q};
          word_cnt <= word_cnt + 1'b1;
        end
      end else if (dv_prev) begin
        // end of frame: flush a partial word, report the word count
        frame_end <= 1'b1;
        if (bit_cnt != '0 && room) begin
          word_we     <= 1'b1;
          word        <= shreg << (WORD_W - 32'(bit_cnt));
          frame_words <= word_cnt + 1'b1;
        end else begin
          frame_words <= word_cnt;
        end
        bit_cnt  <= '0;
        word_cnt <= '0;
        shreg    <= '0;
      end
    end
  end

endmodule
