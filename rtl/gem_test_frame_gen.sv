// gem_test_frame_gen: emulates a GEM module's output for testing the inputs.
//
// The frame is NWORDS (12) 16-bit words written through the GEMTxWord
// registers. When started it is sent as NWORDS*16 (192) consecutive bits with
// DATA_VALID high, word 0 first and each word most significant bit first, so
// the first register's MSB is the first bit out. The same stream is driven on
// all 12 test outputs of port E, which a loopback cable can feed into the
// GEM inputs of port A.
//
// A frame starts on soft_start (a write of 1 to bit 0 of GEMTxStart) or, when
// ext_en (bit 1 of GEMTxStart) is set, on ext_trig (a rising edge of the NIM
// trigger input). A start while a frame is being sent is ignored.
//
// Timing: the first bit and DATA_VALID appear two cycles after the start
// pulse and last for NWORDS*16 cycles; outputs are registered.
//
// From the source material: the 192-bit frame from the VME registers, the
// first-bit-is-MSB-of-first-word order, soft and external start. This
// design's own choices: the ignore-while-busy rule and the latency.
module gem_test_frame_gen #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned NWORDS = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              soft_start,
  input  logic              ext_trig,
  input  logic              ext_en,
  input  logic [WORD_W-1:0] tx_word [NWORDS],
  output logic              tx_data,
  output logic              tx_valid,
  output logic              busy,
  output logic              started
);

  localparam int unsigned NBITS = WORD_W * NWORDS;
  localparam int unsigned CW    = $clog2(NBITS + 1);

  logic [NBITS-1:0] frame, shreg;
  logic [CW-1:0]    bits_left;
  logic             start;

  // word 0 in the most significant position
  always_comb begin
    for (int i = 0; i < NWORDS; i++)
      frame[NBITS-1-i*WORD_W -: WORD_W] = tx_word[i];
  end

  assign start = soft_start || (ext_en && ext_trig);
  assign busy  = (bits_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      tx_data   <= 1'b0;
      tx_valid  <= 1'b0;
      started   <= 1'b0;
    end else begin
      started <= 1'b0;
      if (busy) begin
        tx_valid  <= 1'b1;
        tx_data   <= shreg[NBITS-1];
        shreg     <= shreg << 1;
        bits_left <= bits_left - 1'b1;
      end else begin
        tx_valid <= 1'b0;
        tx_data  <= 1'b0;
        if (start) begin
          shreg     <= frame;
          bits_left <= CW'(NBITS);
          started   <= 1'b1;
        end
      end
    end
  end

endmodule
