// gem_pkg: constants and the register address map shared by the GEM readout
// controller. The controller receives 12 serial GEM streams of 192-bit frames
// (12 words of 16 bits), buffers up to 63 events per channel and is read over
// a 16-bit (D16) register bus. The numbers here are those of the register map
// and the firmware feature list; the byte offsets are the register offsets as
// seen from VME, so every 16-bit register sits on an even byte address.
// GEMTxWord is placed at 0x0016-0x002D, just after GEMTrigWord at 0x0014: the
// two would otherwise share 0x0014, and 0x0016 is where twelve 16-bit words
// end exactly at 0x002D.
package gem_pkg;

  localparam int unsigned NUM_GEM       = 12;   // GEM channels
  localparam int unsigned WORD_W        = 16;   // VME data width (D16)
  localparam int unsigned FRAME_BITS    = 192;  // bits in one GEM frame
  localparam int unsigned FRAME_WORDS   = FRAME_BITS / WORD_W;  // 12
  localparam int unsigned EVENT_DEPTH   = 63;   // buffered events per channel
  localparam int unsigned TRIG_W        = 3;    // T1 trigger word width
  localparam int unsigned ADDR_W        = 16;   // register byte offset width

  localparam logic [7:0] REV_MAJOR = 8'd1;
  localparam logic [7:0] REV_MINOR = 8'd0;

  // Register byte offsets
  localparam logic [15:0] A_BOARD_ID    = 16'h0000;
  localparam logic [15:0] A_REVISION    = 16'h0002;
  localparam logic [15:0] A_RESET       = 16'h0004;
  localparam logic [15:0] A_TX_START    = 16'h0010;
  localparam logic [15:0] A_SOFT_TRIG   = 16'h0012;
  localparam logic [15:0] A_TRIG_WORD   = 16'h0014;
  localparam logic [15:0] A_TX_WORD     = 16'h0016;  // 12 words, to 0x002D
  localparam logic [15:0] A_FIFO_SIZE   = 16'h0030;  // 12 words, to 0x0047
  localparam logic [15:0] A_EVENT_SIZE  = 16'h0048;  // 12 words, to 0x005F
  localparam logic [15:0] A_SENT_H      = 16'h0080;  // 12 words, to 0x0097
  localparam logic [15:0] A_SENT_L      = 16'h00A0;  // 12 words, to 0x00B7
  localparam logic [15:0] A_EVENT_DATA  = 16'h4000;  // 12 x 256 bytes, to 0x4BFF

  // Bytes of the EventsData window given to each channel
  localparam int unsigned DATA_SEG_BYTES = 256;

  // What one channel reports to the register file
  typedef struct packed {
    logic [5:0]  event_count;   // buffered events (0..63)
    logic [9:0]  data_count;    // buffered 16-bit data words
    logic [3:0]  next_size;     // word count of the oldest buffered event
    logic [31:0] frames_sent;   // frames the GEM has ever sent
  } gem_status_t;

endpackage
