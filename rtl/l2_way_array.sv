// l2_way_array: one way of the L2 cache - its tag, valid and data arrays.
//
// The way is active only when `en` (its way-decoder output) is set; with en
// low the way reports no hit, drives zero data and ignores writes, which is
// what lets a direct-mapped (way-tagged) access save the energy of the other
// ways. Reads are combinational from `set`; writes take effect at the
// rising clock edge:
//   * fill   - write tag, data line, set valid  (line fill from memory)
//   * wr_word- write one word of the line        (write-through store hit)
// The caller only writes a word to a way that hit. Valid bits reset to 0.
module l2_way_array
  import cache_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  addr_t addr,          // index, tag and word come from this address
  output logic  hit,
  output logic  valid,         // valid bit of the indexed line (when en)
  output logic [ADDR_W-LINE_LSB-$clog2(SETS)-1:0] tag,  // stored tag (when en)
  output line_t rdata,
  input  logic  fill,
  input  line_t fill_line,
  input  logic  wr_word,
  input  word_t wdata
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - LINE_LSB - IDX_W;

  logic [SETS-1:0]  valid_q;
  logic [TAG_W-1:0] tag_q  [SETS];
  line_t            data_q [SETS];

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] atag;
  assign idx  = addr[LINE_LSB +: IDX_W];
  assign atag = addr[ADDR_W-1 -: TAG_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            valid_q <= '0;
    else if (en && fill)   valid_q[idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en && fill) begin
      tag_q[idx]  <= atag;
      data_q[idx] <= fill_line;
    end else if (en && wr_word) begin
      data_q[idx][word_sel(addr)*WORD_W +: WORD_W] <= wdata;
    end
  end

  assign valid = en && valid_q[idx];
  assign tag   = en ? tag_q[idx] : '0;
  assign hit   = valid && tag_q[idx] == atag;
  assign rdata = en ? data_q[idx] : '0;

endmodule
