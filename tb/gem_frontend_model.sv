// gem_frontend_model: behavioural model of one GEM front-end module, for
// testbenches only. It samples T1 on the rising edge of the received CLK;
// idle T1 is 0 and a 1 starts a 3-bit trigger word (so the trigger words
// used with it must have their MSB set). For every word received it sends,
// LATENCY CLK cycles later, a frame of NWORDS 16-bit words on DATA with
// DATA_VALID high, first word first and MSB first, launched on the rising
// edge of CLK (the middle of the controller's clock period). Word i of the
// k-th frame is {CH[3:0], 1'b0, trigger word, k[3:0], i[3:0]}, so every
// word tells which channel, trigger and event it came from.
module gem_frontend_model #(
  parameter int unsigned CH      = 0,
  parameter int unsigned NWORDS  = 12,
  parameter int unsigned LATENCY = 20
) (
  input  logic gem_clk,
  input  logic t1,
  output logic data,
  output logic data_valid
);

  logic [2:0] trig_sh;
  int         trig_bits = 0;
  int         frames    = 0;
  int         words_received = 0;

  // pending frames: trigger word and the CLK cycle at which to start
  logic [2:0]  pend_word [$];
  longint      pend_at   [$];
  longint      ncyc = 0;
  int          bit_idx = -1;
  logic [NWORDS*16-1:0] frame;

  initial begin
    data = 1'b0;
    data_valid = 1'b0;
    trig_sh = '0;
  end

  always @(posedge gem_clk) begin
    ncyc <= ncyc + 1;
    // T1 decoding
    if (trig_bits == 0) begin
      if (t1) begin
        trig_sh   <= 3'b001;
        trig_bits <= 1;
      end
    end else begin
      if (trig_bits == 2) begin
        pend_word.push_back({trig_sh[1:0], t1});
        pend_at.push_back(ncyc + LATENCY);
        words_received <= words_received + 1;
        trig_bits <= 0;
      end else begin
        trig_sh   <= {trig_sh[1:0], t1};
        trig_bits <= trig_bits + 1;
      end
    end
    // frame transmission
    if (bit_idx < 0 && pend_at.size() != 0 && ncyc >= pend_at[0]) begin
      logic [2:0] w;
      void'(pend_at.pop_front());
      w = pend_word.pop_front();
      for (int i = 0; i < NWORDS; i++)
        frame[NWORDS*16-1-16*i -: 16] = {4'(CH), 1'b0, w, 4'(frames), 4'(i)};
      frames  <= frames + 1;
      bit_idx <= 0;
      data       <= frame[NWORDS*16-1];
      data_valid <= 1'b1;
    end else if (bit_idx >= 0) begin
      if (bit_idx + 1 < NWORDS * 16) begin
        data    <= frame[NWORDS*16-2-bit_idx];
        bit_idx <= bit_idx + 1;
      end else begin
        data       <= 1'b0;
        data_valid <= 1'b0;
        bit_idx    <= -1;
      end
    end
  end

endmodule
