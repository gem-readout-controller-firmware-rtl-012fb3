// t1_trigger_gen: drives the T1 and CLK lines to the GEM modules (port C).
//
// A trigger sends a TRIG_W-bit (3-bit) trigger word serially on T1, most
// significant bit first, one bit per clock, with T1 low when idle. A hard
// trigger (rising edge of the NIM trigger input) sends hard_word; a soft
// trigger (a write of the GEMSoftTrig register) sends soft_word. While the
// first TRIG_W-1 bits of a word are on T1, any new trigger is ignored, so of
// triggers closer than TRIG_W cycles apart only the first produces a word;
// a trigger exactly TRIG_W cycles after the last one follows without a gap. When a hard and a soft
// trigger arrive in the same idle cycle, the hard one is sent.
//
// T1 is launched from the rising edge of the system clock. CLK is the system
// clock launched from its falling edge (ddr_out), so its rising edge falls in
// the middle of each T1 bit and the GEM captures T1 with the rising edge of
// the received CLK.
//
// Timing: the first bit is on t1 the cycle after the trigger pulse; busy is
// (a word on T1) is high for TRIG_W cycles. hard_sent/soft_sent/ignored are one-cycle pulses.
//
// From the source material: the 3-bit hard and soft words, the lock-out while
// a word is shifted, T1 on the rising and CLK on the falling edge. This
// design's own choices: MSB-first order, idle-low T1, no start bit, and that a
// soft trigger also blocks a hard one.
module t1_trigger_gen #(
  parameter int unsigned TRIG_W = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              hard_trig,   // synchronised rising edge pulse
  input  logic              soft_trig,   // register write pulse
  input  logic [TRIG_W-1:0] hard_word,
  input  logic [TRIG_W-1:0] soft_word,
  output logic              t1,
  output logic              gem_clk,
  output logic              busy,
  output logic              hard_sent,
  output logic              soft_sent,
  output logic              ignored
);

  localparam int unsigned CW = $clog2(TRIG_W + 1);

  logic [TRIG_W-1:0] shreg;
  logic [CW-1:0]     bits_left;

  logic can_load;   // idle, or the last bit of a word is on T1

  assign busy     = (bits_left != '0);
  assign can_load = (bits_left <= 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      t1        <= 1'b0;
      hard_sent <= 1'b0;
      soft_sent <= 1'b0;
      ignored   <= 1'b0;
    end else begin
      hard_sent <= 1'b0;
      soft_sent <= 1'b0;
      ignored   <= 1'b0;
      if (can_load && (hard_trig || soft_trig)) begin
        // load the word and put its MSB on T1 at once
        logic [TRIG_W-1:0] w;
        w          = hard_trig ? hard_word : soft_word;
        t1        <= w[TRIG_W-1];
        shreg     <= w << 1;
        bits_left <= CW'(TRIG_W);
        hard_sent <= hard_trig;
        soft_sent <= !hard_trig;
        ignored   <= hard_trig && soft_trig;
      end else begin
        if (busy) begin
          // bits_left counts the bit now on T1 too
          t1        <= (bits_left > 1) ? shreg[TRIG_W-1] : 1'b0;
          shreg     <= shreg << 1;
          bits_left <= bits_left - 1'b1;
        end else begin
          t1 <= 1'b0;
        end
        ignored <= !can_load && (hard_trig || soft_trig);
      end
    end
  end

  ddr_out u_clk_fwd (
    .clk    (clk),
    .rst    (rst),
    .d_rise (1'b0),
    .d_fall (1'b1),
    .q      (gem_clk)
  );

endmodule
