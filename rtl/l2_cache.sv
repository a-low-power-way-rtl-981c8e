// l2_cache: inclusive, 4-way set-associative, way-tagged L2 cache with its
// controller, way decoder, way register and memory port.
//
// The L2 serves two kinds of request from the L1 side:
//   * stores from the write buffer, each with the way tag and write-miss
//     status from the way-tag buffer. A store that hit in the L1 carries a
//     valid way tag and is done direct-mapped: only that way's tag and data
//     arrays are enabled. A store that missed in the L1 enables all ways
//     (set-associative). A hit updates the word in the L2; either way the
//     store is then written through to memory (no allocation on a miss).
//   * line reads for L1 read misses, always set-associative. On an L2 hit
//     the line goes back with the tag of the way that held it (from the way
//     register). On an L2 miss the line is read from memory and filled into
//     a victim way: an invalid way if there is one, otherwise the set's
//     round-robin pointer. A valid victim is back-invalidated in the L1
//     (inv_en/inv_addr) so the L1 stays a subset of the L2 and every way
//     tag held by the L1 stays correct.
// Stores in the write buffer go first: a line read is only started when the
// write buffer is empty, so a refill sees all earlier stores.
//
// The replacement policy, the write-through to memory and the ordering rule
// are this design's choices; the published scheme gives the access modes, the way
// decoder and the way register.
//
// Timing: a direct-mapped or set-associative store takes one cycle in the
// arrays plus the memory write; a read that hits takes one cycle after it
// is taken (rd_valid then); a miss adds the memory read and one fill cycle.
// Memory port: mem_req is held until a one-cycle mem_ready; mem_we selects a
// word write (mem_wdata) or a line read (mem_rdata, valid with mem_ready).
module l2_cache
  import cache_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS,
  parameter int unsigned WAYS = L2_WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // line read for an L1 read miss
  input  logic                    rd_req,
  input  addr_t                   rd_addr,
  output logic                    rd_valid,
  output line_t                   rd_line,
  output logic [$clog2(WAYS)-1:0] rd_way,
  // write buffer and way-tag buffer heads
  input  logic                    wb_empty,
  input  wb_entry_t               wb_head,
  input  logic                    wt_avail,
  input  logic [$clog2(WAYS)-1:0] wt_way,
  input  logic                    wt_miss,
  output logic                    wb_pop,
  // back-invalidation of the L1
  output logic                    inv_en,
  output addr_t                   inv_addr,
  // memory
  output logic                    mem_req,
  output logic                    mem_we,
  output addr_t                   mem_addr,
  output word_t                   mem_wdata,
  input  line_t                   mem_rdata,
  input  logic                    mem_ready,
  // way enables of this cycle (one bit per activated way)
  output logic [WAYS-1:0]         way_en
);
  localparam int unsigned WW    = $clog2(WAYS);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - LINE_LSB - IDX_W;

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_MEMW, S_RLOOK, S_MEMR, S_FILL} state_t;
  state_t state_q, state_d;

  addr_t            cur_addr;
  word_t            cur_data;
  logic [WW-1:0]    cur_way;
  logic             cur_miss;
  logic [WW-1:0]    victim_q;
  logic             victim_valid_q;
  logic [TAG_W-1:0] victim_tag_q;
  line_t            line_q;
  logic [WW-1:0]    rr_q [SETS];

  logic [WAYS-1:0]  hit_vec, valid_vec;
  logic [TAG_W-1:0] tag_vec  [WAYS];
  line_t            data_vec [WAYS];
  logic [WAYS-1:0]  reg_sel;
  logic [WW-1:0]    reg_tag;
  logic             reg_valid;
  logic [IDX_W-1:0] cur_idx;
  assign cur_idx = cur_addr[LINE_LSB +: IDX_W];

  // ---------------- way decoder and arrays ----------------
  way_decoder #(.WAYS(WAYS)) u_dec (
    .wr     (state_q == S_WRITE),
    .wr_miss(cur_miss),
    .rd_miss(state_q == S_RLOOK),
    .fill   (state_q == S_FILL),
    .way    (state_q == S_FILL ? victim_q : cur_way),
    .way_en (way_en)
  );

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    l2_way_array #(.SETS(SETS)) u_way (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (way_en[w]),
      .addr     (cur_addr),
      .hit      (hit_vec[w]),
      .valid    (valid_vec[w]),
      .tag      (tag_vec[w]),
      .rdata    (data_vec[w]),
      .fill     (state_q == S_FILL),
      .fill_line(line_q),
      .wr_word  (state_q == S_WRITE && hit_vec[w]),
      .wdata    (cur_data)
    );
  end

  // ---------------- way register ----------------
  always_comb begin
    reg_sel = '0;
    if (state_q == S_RLOOK)     reg_sel = hit_vec;
    else if (state_q == S_FILL) reg_sel[victim_q] = 1'b1;
  end

  way_register #(.WAYS(WAYS)) u_wreg (
    .clk    (clk),
    .rst_n  (rst_n),
    .sel    (reg_sel),
    .way_tag(reg_tag),
    .valid  (reg_valid)
  );

  // ---------------- victim choice ----------------
  logic [WW-1:0] victim_d;
  always_comb begin
    victim_d = rr_q[cur_idx];
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (!valid_vec[w]) victim_d = WW'(w);
  end

  line_t hit_line;
  always_comb begin
    hit_line = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (hit_vec[w]) hit_line = hit_line | data_vec[w];
  end

  // ---------------- controller ----------------
  always_comb begin
    state_d   = state_q;
    wb_pop    = 1'b0;
    rd_valid  = 1'b0;
    rd_line   = line_q;
    rd_way    = reg_tag;
    inv_en    = 1'b0;
    inv_addr  = {victim_tag_q, cur_idx, {LINE_LSB{1'b0}}};
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = cur_addr;
    mem_wdata = cur_data;
    unique case (state_q)
      S_IDLE: begin
        if (!wb_empty && wt_avail) begin
          wb_pop  = 1'b1;
          state_d = S_WRITE;
        end else if (rd_req && wb_empty) begin
          state_d = S_RLOOK;
        end
      end
      S_WRITE: state_d = S_MEMW;
      S_MEMW: begin
        mem_req = 1'b1;
        mem_we  = 1'b1;
        if (mem_ready) state_d = S_IDLE;
      end
      S_RLOOK: begin
        if (|hit_vec) begin
          rd_valid = 1'b1;
          rd_line  = hit_line;
          state_d  = S_IDLE;
        end else begin
          state_d  = S_MEMR;
        end
      end
      S_MEMR: begin
        mem_req  = 1'b1;
        mem_addr = {cur_addr[ADDR_W-1:LINE_LSB], {LINE_LSB{1'b0}}};
        if (mem_ready) state_d = S_FILL;
      end
      S_FILL: begin
        inv_en   = victim_valid_q;
        rd_valid = 1'b1;
        state_d  = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      cur_addr       <= '0;
      cur_data       <= '0;
      cur_way        <= '0;
      cur_miss       <= 1'b0;
      victim_q       <= '0;
      victim_valid_q <= 1'b0;
      victim_tag_q   <= '0;
      line_q         <= '0;
      for (int s = 0; s < int'(SETS); s++) rr_q[s] <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE) begin
        if (!wb_empty && wt_avail) begin
          cur_addr <= wb_head.addr;
          cur_data <= wb_head.data;
          cur_way  <= wt_way;
          cur_miss <= wt_miss;
        end else if (rd_req && wb_empty) begin
          cur_addr <= rd_addr;
        end
      end
      if (state_q == S_RLOOK && !(|hit_vec)) begin
        victim_q       <= victim_d;
        victim_valid_q <= valid_vec[victim_d];
        victim_tag_q   <= tag_vec[victim_d];
      end
      if (state_q == S_MEMR && mem_ready) line_q <= mem_rdata;
      if (state_q == S_FILL) rr_q[cur_idx] <= victim_q + 1'b1;
    end
  end

  // A store that hit in the L1 must find its line in the way its tag names.
  a_inclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                (state_q == S_WRITE && !cur_miss) |-> hit_vec[cur_way]);
  a_tag_sent:  assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> reg_valid);
  a_one_hit:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec));

endmodule
