// trigger_sync: brings the NIM trigger input (port G, channel 1) into the
// system clock domain and finds its rising edges.
//
// The input passes through SYNC_STAGES flip-flops; a rising edge is a cycle
// where the synchronised level is 1 and was 0 the cycle before. trig_rise is
// a one-cycle pulse, SYNC_STAGES+1 cycles after the input rises. The source
// material only says the trigger is synchronised to the reference clock; the
// two-stage synchroniser and the edge detector are this design's choice.
module trigger_sync #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic trig_in,     // asynchronous NIM trigger level
  output logic trig_level,  // synchronised level
  output logic trig_rise    // one-cycle pulse on each rising edge
);

  logic [SYNC_STAGES-1:0] sync;
  logic                   last;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= '0;
      last      <= 1'b0;
      trig_rise <= 1'b0;
    end else begin
      sync      <= {sync[SYNC_STAGES-2:0], trig_in};
      last      <= sync[SYNC_STAGES-1];
      trig_rise <= sync[SYNC_STAGES-1] && !last;
    end
  end

  assign trig_level = sync[SYNC_STAGES-1];

endmodule
