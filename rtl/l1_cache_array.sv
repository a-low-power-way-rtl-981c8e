// l1_cache_array: tag, valid and data storage of the L1 data cache.
//
// Direct-mapped, LINES lines of one 512-bit cache line each (line size as
// in the design's waveforms; the organisation is this design's choice, the
// published scheme leaves the L1 organisation open). The lookup port is
// combinational: from lk_addr it gives the hit flag and the addressed word.
// Three write operations take effect at the rising clock edge:
//   * wr_en   - write one word of the line at wr_addr (store hit; the caller
//               checks the hit, the array writes unconditionally)
//   * fill_en - write a whole line with its tag and set it valid (miss fill)
//   * inv_en  - clear the valid bit of the line at inv_addr if it holds that
//               address (back-invalidation when the inclusive L2 evicts)
// If a fill and an invalidation hit the same line in one cycle the fill wins.
// Valid bits are cleared at reset; data and tags are not.
module l1_cache_array
  import cache_pkg::*;
#(
  parameter int unsigned LINES = L1_LINES
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  addr_t lk_addr,
  output logic  lk_hit,
  output word_t lk_word,
  // store word
  input  logic  wr_en,
  input  addr_t wr_addr,
  input  word_t wr_data,
  // line fill
  input  logic  fill_en,
  input  addr_t fill_addr,
  input  line_t fill_line,
  // back-invalidation
  input  logic  inv_en,
  input  addr_t inv_addr
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - LINE_LSB - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  function automatic idx_t idx_of(addr_t a);
    return a[LINE_LSB +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  logic [LINES-1:0] valid_q;
  tag_t             tag_q  [LINES];
  line_t            data_q [LINES];

  // Valid bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (inv_en && valid_q[idx_of(inv_addr)] && tag_q[idx_of(inv_addr)] == tag_of(inv_addr))
        valid_q[idx_of(inv_addr)] <= 1'b0;
      if (fill_en)
        valid_q[idx_of(fill_addr)] <= 1'b1;
    end
  end

  // Tags and data
  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_q[idx_of(fill_addr)]  <= tag_of(fill_addr);
      data_q[idx_of(fill_addr)] <= fill_line;
    end else if (wr_en) begin
      data_q[idx_of(wr_addr)][word_sel(wr_addr)*WORD_W +: WORD_W] <= wr_data;
    end
  end

  assign lk_hit  = valid_q[idx_of(lk_addr)] && tag_q[idx_of(lk_addr)] == tag_of(lk_addr);
  assign lk_word = data_q[idx_of(lk_addr)][word_sel(lk_addr)*WORD_W +: WORD_W];

endmodule
