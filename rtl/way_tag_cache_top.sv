// way_tag_cache_top: two-level data cache that combines a performance-
// degradation-tolerant (PDT) L1 with a way-tagged L2.
//
// The L1 is write-through, so every store also goes to the L2. The L2 is
// inclusive, so a line in the L1 sits in one fixed L2 way until the L2
// evicts it (and then the L1 copy is invalidated). When the L1 receives a
// line it also receives and keeps that way's 2-bit tag (way-tag array);
// a later store that hits in the L1 carries the tag with it through the
// write buffer / way-tag buffer pair, and the L2 then enables only that one
// way instead of all four. Loads that hit in the L1 do not touch the L2;
// loads that miss and stores that miss search all ways.
// Faulty L1 words, recorded in the fault map (filled by an external BIST or
// ECC checker through the fm_* port), are never returned: a load of one is
// treated as a miss and served from the L2.
//
// Blocks: pdt_l1_controller, l1_cache_array, fault_map, way_tag_array,
// write_buffer, way_tag_buffer, l2_cache (way decoder, way register, four
// l2_way_array ways). Main memory and the processor are outside.
//
// Processor port: present a request with req_p (we_p, addr_p, wdata_p)
// and hold it until the one-cycle ready_p, which comes with hit_p or miss_p
// and the load data on rdata_p. Memory port: mem_req held until a
// one-cycle mem_ready; mem_we=1 writes the word mem_wdata at mem_addr,
// mem_we=0 reads the 512-bit line at mem_addr into mem_rdata.
// l2_way_en shows which L2 ways are active in each cycle.
module way_tag_cache_top
  import cache_pkg::*;
#(
  parameter int unsigned L1_N     = L1_LINES,
  parameter int unsigned L2_N     = L2_SETS,
  parameter int unsigned N_WAYS   = L2_WAYS,
  parameter int unsigned WB_N     = WB_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              req_p,
  input  logic              we_p,
  input  addr_t             addr_p,
  input  word_t             wdata_p,
  output word_t             rdata_p,
  output logic              ready_p,
  output logic              hit_p,
  output logic              miss_p,
  // fault map write port (BIST / ECC)
  input  logic              fm_we,
  input  addr_t             fm_addr,
  input  logic              fm_faulty,
  // memory
  output logic              mem_req,
  output logic              mem_we,
  output addr_t             mem_addr,
  output word_t             mem_wdata,
  input  line_t             mem_rdata,
  input  logic              mem_ready,
  // observation
  output logic [N_WAYS-1:0] l2_way_en
);
  localparam int unsigned WW = $clog2(N_WAYS);

  addr_t         lk_addr;
  logic          lk_hit, fm_out;
  word_t         lk_word;
  logic          l1_wr_en, l1_fill_en;
  word_t         l1_wr_data;
  line_t         l1_fill_line;
  logic          writeh_w, update;
  logic [WW-1:0] wt_way_in, wt_way_q;
  logic          wb_push, wb_status_miss, wb_full, wb_empty, wb_pop;
  wb_entry_t     wb_din, wb_head;
  logic          wt_avail, wt_miss;
  logic [WW-1:0] wt_way;
  logic          l2_rd_req, l2_rd_valid;
  addr_t         l2_rd_addr;
  line_t         l2_rd_line;
  logic [WW-1:0] l2_rd_way;
  logic          inv_en;
  addr_t         inv_addr;

  pdt_l1_controller #(.WAYS(N_WAYS)) u_l1_ctrl (
    .clk, .rst_n,
    .req_p, .we_p, .addr_p, .wdata_p, .rdata_p, .ready_p, .hit_p, .miss_p,
    .lk_addr, .lk_hit, .lk_word, .fm_out,
    .l1_wr_en, .l1_wr_data, .l1_fill_en, .l1_fill_line,
    .writeh_w, .update, .wt_way_in,
    .wb_push, .wb_din, .wb_status_miss, .wb_full,
    .l2_rd_req, .l2_rd_addr, .l2_rd_valid, .l2_rd_line, .l2_rd_way
  );

  l1_cache_array #(.LINES(L1_N)) u_l1 (
    .clk, .rst_n,
    .lk_addr, .lk_hit, .lk_word,
    .wr_en    (l1_wr_en),
    .wr_addr  (lk_addr),
    .wr_data  (l1_wr_data),
    .fill_en  (l1_fill_en),
    .fill_addr(lk_addr),
    .fill_line(l1_fill_line),
    .inv_en, .inv_addr
  );

  fault_map #(.LINES(L1_N)) u_fm (
    .clk, .rst_n,
    .we       (fm_we),
    .wr_addr  (fm_addr),
    .wr_faulty(fm_faulty),
    .rd_addr  (lk_addr),
    .fm_out
  );

  way_tag_array #(.LINES(L1_N), .TAG_BITS(WW)) u_wta (
    .clk, .rst_n,
    .writeh_w, .update,
    .addr   (lk_addr),
    .way_in (wt_way_in),
    .way_out(wt_way_q)
  );

  write_buffer #(.DEPTH(WB_N)) u_wb (
    .clk, .rst_n,
    .push (wb_push),
    .din  (wb_din),
    .pop  (wb_pop),
    .dout (wb_head),
    .empty(wb_empty),
    .full (wb_full)
  );

  way_tag_buffer #(.DEPTH(WB_N), .TAG_BITS(WW)) u_wtb (
    .clk, .rst_n,
    .wb_push (wb_push),
    .miss_in (wb_status_miss),
    .way_in  (wt_way_q),
    .rd      (wb_pop),
    .way_out (wt_way),
    .miss_out(wt_miss),
    .empty   (),
    .avail   (wt_avail)
  );

  l2_cache #(.SETS(L2_N), .WAYS(N_WAYS)) u_l2 (
    .clk, .rst_n,
    .rd_req  (l2_rd_req),
    .rd_addr (l2_rd_addr),
    .rd_valid(l2_rd_valid),
    .rd_line (l2_rd_line),
    .rd_way  (l2_rd_way),
    .wb_empty,
    .wb_head,
    .wt_avail,
    .wt_way,
    .wt_miss,
    .wb_pop,
    .inv_en, .inv_addr,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
    .way_en  (l2_way_en)
  );

endmodule
