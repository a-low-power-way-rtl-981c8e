// cache_pkg: sizes and shared types of the way-tagged two-level cache.
//
// The processor port is 32 bits of address and 32 bits of data, and a cache
// line is 512 bits (16 words), the widths the design's reference waveform
// shows. The L2 is 4-way set-associative with 2-bit way tags "00".."11".
// The remaining sizes (64 L1 lines, direct-mapped; 256 L2 sets; a 4-entry
// write buffer) are this design's own choice.
//
// Address split (byte address):
//   [1:0]   byte in word (ignored, word accesses only)
//   [5:2]   word in line
//   [11:6]  L1 index         [31:12] L1 tag
//   [13:6]  L2 index         [31:14] L2 tag
package cache_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned LINE_W   = 512;
  localparam int unsigned WORDS    = LINE_W / WORD_W;      // 16
  localparam int unsigned OFF_W    = $clog2(WORDS);        // 4
  localparam int unsigned BYTE_W   = 2;
  localparam int unsigned LINE_LSB = BYTE_W + OFF_W;       // 6

  localparam int unsigned L1_LINES = 64;
  localparam int unsigned L2_SETS  = 256;
  localparam int unsigned L2_WAYS  = 4;
  localparam int unsigned WAY_W    = $clog2(L2_WAYS);      // 2
  localparam int unsigned WB_DEPTH = 4;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // One store waiting in the write buffer.
  typedef struct packed {
    addr_t addr;
    word_t data;
  } wb_entry_t;

  // Word select within a line.
  function automatic logic [OFF_W-1:0] word_sel(addr_t a);
    return a[LINE_LSB-1:BYTE_W];
  endfunction

endpackage
