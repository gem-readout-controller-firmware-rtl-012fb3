// gem_event_buffer: event buffer of one GEM channel.
//
// Holds up to EVENT_DEPTH (63) events. It is made of two FIFOs that advance
// together: the EventSize FIFO, one entry per event holding its 16-bit word
// count (normally 12), and the EventData FIFO holding the words themselves.
// Software polls event_count, pops the next event size (size_rd), then pops
// exactly that many words (data_rd).
//
// Words of the frame being received are written at a tentative write pointer
// and become visible only at frame_end, when the event is committed: its size
// is pushed, the data write pointer advances and both counts grow. Whether a
// frame is kept is decided at frame_start: it is kept only if fewer than
// EVENT_DEPTH events are buffered and the data FIFO has room for a frame of
// MAX_WORDS words; otherwise the whole frame is dropped (frame_dropped pulses
// at its end). frames_sent counts every frame that ends, kept or not, so
// frames_sent minus the events read out is the number of dropped frames.
//
// Timing: a pop takes effect on the cycle of the strobe. The popped data
// word appears on data_q one cycle after data_rd. next_size shows the size of
// the oldest event combinationally (0 when none is buffered). Pops of an
// empty FIFO are ignored. The data FIFO is a simple dual-port RAM.
//
// From the source material: the 63-event depth, the EventSize/EventData split,
// the counts reported, the count of sent frames. This design's own choices: the
// commit-at-end scheme, the drop rule, DATA_DEPTH (1024 words, the largest the
// 10-bit buffered-words field can report) and the pop semantics of reads.
module gem_event_buffer #(
  parameter int unsigned WORD_W      = 16,
  parameter int unsigned EVENT_DEPTH = 63,
  parameter int unsigned DATA_DEPTH  = 1024,
  parameter int unsigned MAX_WORDS   = 12,
  parameter int unsigned SIZE_W      = 4,
  parameter int unsigned ECNT_W      = $clog2(EVENT_DEPTH + 1),
  parameter int unsigned DCNT_W      = $clog2(DATA_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // from the frame receiver
  input  logic              frame_start,
  input  logic              frame_end,
  input  logic [SIZE_W-1:0] frame_words,
  input  logic              word_we,
  input  logic [WORD_W-1:0] word,
  // readout
  input  logic              size_rd,
  input  logic              data_rd,
  output logic [WORD_W-1:0] data_q,
  // status
  output logic [ECNT_W-1:0] event_count,
  output logic [DCNT_W-1:0] data_count,
  output logic [SIZE_W-1:0] next_size,
  output logic [31:0]       frames_sent,
  output logic              frame_dropped
);

  localparam int unsigned DA_W = $clog2(DATA_DEPTH);

  if ((DATA_DEPTH & (DATA_DEPTH - 1)) != 0) begin : gen_chk_data_depth
    $error("DATA_DEPTH must be a power of two");
  end
  if (EVENT_DEPTH + 1 != (1 << ECNT_W)) begin : gen_chk_event_depth
    $error("EVENT_DEPTH must be one less than a power of two");
  end

  // EventData FIFO
  logic [WORD_W-1:0] data_mem [DATA_DEPTH];
  logic [DA_W-1:0]   wr_ptr, wr_tmp, rd_ptr;

  // EventSize FIFO (2**ECNT_W entries, at most EVENT_DEPTH used)
  logic [SIZE_W-1:0] size_mem [1 << ECNT_W];
  logic [ECNT_W-1:0] size_wr_ptr, size_rd_ptr;

  logic accepting;                 // current frame is being kept
  logic size_pop, data_pop, commit;

  assign size_pop = size_rd && (event_count != '0);
  assign data_pop = data_rd && (data_count != '0);
  assign commit   = frame_end && accepting;

  assign next_size = (event_count != '0) ? size_mem[size_rd_ptr] : '0;

  // data RAM: write port and registered read port
  always_ff @(posedge clk) begin
    if (word_we && accepting) data_mem[wr_tmp] <= word;
    if (data_rd)              data_q <= data_mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (commit) size_mem[size_wr_ptr] <= frame_words;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr        <= '0;
      wr_tmp        <= '0;
      rd_ptr        <= '0;
      size_wr_ptr   <= '0;
      size_rd_ptr   <= '0;
      event_count   <= '0;
      data_count    <= '0;
      frames_sent   <= '0;
      accepting     <= 1'b0;
      frame_dropped <= 1'b0;
    end else begin
      frame_dropped <= 1'b0;

      if (frame_start) begin
        accepting <= (event_count < ECNT_W'(EVENT_DEPTH)) &&
                     (32'(data_count) + MAX_WORDS <= DATA_DEPTH - 1);
        wr_tmp    <= wr_ptr;
      end else if (word_we && accepting) begin
        wr_tmp <= wr_tmp + 1'b1;
      end

      if (frame_end) begin
        frames_sent   <= frames_sent + 1'b1;
        frame_dropped <= !accepting;
        accepting     <= 1'b0;
      end

      if (commit) begin
        wr_ptr      <= wr_tmp + DA_W'(word_we);
        size_wr_ptr <= size_wr_ptr + 1'b1;
      end
      if (size_pop) size_rd_ptr <= size_rd_ptr + 1'b1;
      if (data_pop) rd_ptr      <= rd_ptr + 1'b1;

      event_count <= event_count + ECNT_W'(commit) - ECNT_W'(size_pop);
      data_count  <= data_count + (commit ? DCNT_W'(frame_words) : '0)
                                - DCNT_W'(data_pop);
    end
  end

  // a frame cannot start while the previous one is still open
  assert property (@(posedge clk) disable iff (rst) frame_start |-> !accepting)
    else $error("frame_start inside an open frame");

endmodule
