// pdt_l1_controller: controller of the write-through, performance-
// degradation-tolerant (PDT) L1 data cache.
//
// One processor request is handled at a time (req_p with we_p, addr_p,
// wdata_p, sampled in IDLE; the processor holds them until ready_p). The
// L1 arrays and the fault map are looked up combinationally in IDLE, and
// the state machine then follows the PDT cache's states:
//   READ_HIT   - tag hit and FMOut low: return the L1 word, back to IDLE.
//   READ_MISS  - tag miss, or FMOut high (the L1 word is known faulty): ask
//                the L2 for the line (set-associative L2 access).
//   WAIT_READ  - until the L2 answers; the line is then written into the
//                L1 and its L2 way tag into the way-tag array
//                (WRITEH_W=1, UPDATE=1).
//   READ_DATA  - return the word, taken from the line the L2 sent (never
//                from the possibly faulty L1 copy), back to IDLE.
//   WRITE_HIT / WRITE_MISS - record whether the line is in the L1.
//   WAIT_WRITE - until the write buffer has room (ReadyM).
//   WRITE_DATA - in one cycle: write the word into the L1 on a hit (no
//                allocation on a miss), push the store into the write
//                buffer, read the way-tag array (WRITEH_W=1, UPDATE=0) and
//                hand the write-miss status to the way-tag buffer; back to
//                IDLE.
// ready_p is a one-cycle pulse that ends every request, with hit_p or
// miss_p and, for a load, rdata_p. Latencies: read hit 2 cycles, store 4
// cycles (more if the write buffer is full), read miss 4 cycles plus the L2.
// A store hit counts as a hit whatever FMOut says: the L2 copy is written
// either way and the way tag is valid. The one-request-at-a-time handshake
// is this design's choice.
module pdt_l1_controller
  import cache_pkg::*;
#(
  parameter int unsigned WAYS = L2_WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // processor
  input  logic                    req_p,
  input  logic                    we_p,
  input  addr_t                   addr_p,
  input  word_t                   wdata_p,
  output word_t                   rdata_p,
  output logic                    ready_p,
  output logic                    hit_p,
  output logic                    miss_p,
  // L1 arrays and fault map
  output addr_t                   lk_addr,
  input  logic                    lk_hit,
  input  word_t                   lk_word,
  input  logic                    fm_out,
  output logic                    l1_wr_en,
  output word_t                   l1_wr_data,
  output logic                    l1_fill_en,
  output line_t                   l1_fill_line,
  // way-tag array
  output logic                    writeh_w,
  output logic                    update,
  output logic [$clog2(WAYS)-1:0] wt_way_in,
  // write buffer / way-tag buffer
  output logic                    wb_push,
  output wb_entry_t               wb_din,
  output logic                    wb_status_miss,
  input  logic                    wb_full,
  // L2 line read
  output logic                    l2_rd_req,
  output addr_t                   l2_rd_addr,
  input  logic                    l2_rd_valid,
  input  line_t                   l2_rd_line,
  input  logic [$clog2(WAYS)-1:0] l2_rd_way
);
  typedef enum logic [3:0] {
    IDLE, READ_HIT, READ_MISS, WAIT_READ, READ_DATA,
    WRITE_HIT, WRITE_MISS, WAIT_WRITE, WRITE_DATA
  } state_t;

  state_t state_q, state_d;
  addr_t  addr_q;
  word_t  data_q;     // store data, then load data
  logic   hit_q;

  // Lookups use the incoming address in IDLE, the held one afterwards.
  assign lk_addr      = (state_q == IDLE) ? addr_p : addr_q;
  assign l1_wr_data   = data_q;
  assign l1_fill_line = l2_rd_line;
  assign wt_way_in    = l2_rd_way;
  assign wb_din       = '{addr: addr_q, data: data_q};
  assign l2_rd_addr   = addr_q;
  assign rdata_p      = data_q;

  always_comb begin
    state_d        = state_q;
    ready_p        = 1'b0;
    hit_p          = 1'b0;
    miss_p         = 1'b0;
    l1_wr_en       = 1'b0;
    l1_fill_en     = 1'b0;
    writeh_w       = 1'b0;
    update         = 1'b0;
    wb_push        = 1'b0;
    wb_status_miss = !hit_q;
    l2_rd_req      = 1'b0;
    unique case (state_q)
      IDLE: if (req_p) begin
        if (we_p) state_d = lk_hit ? WRITE_HIT : WRITE_MISS;
        else      state_d = (lk_hit && !fm_out) ? READ_HIT : READ_MISS;
      end
      READ_HIT: begin
        ready_p = 1'b1;
        hit_p   = 1'b1;
        state_d = IDLE;
      end
      READ_MISS: begin
        l2_rd_req = 1'b1;
        state_d   = WAIT_READ;
      end
      WAIT_READ: begin
        l2_rd_req = 1'b1;
        if (l2_rd_valid) begin
          l1_fill_en = 1'b1;
          writeh_w   = 1'b1;
          update     = 1'b1;
          state_d    = READ_DATA;
        end
      end
      READ_DATA: begin
        ready_p = 1'b1;
        miss_p  = 1'b1;
        state_d = IDLE;
      end
      WRITE_HIT, WRITE_MISS: state_d = WAIT_WRITE;
      WAIT_WRITE: if (!wb_full) state_d = WRITE_DATA;
      WRITE_DATA: begin
        l1_wr_en = hit_q;
        wb_push  = 1'b1;
        writeh_w = 1'b1;          // UPDATE low: read the way tag
        ready_p  = 1'b1;
        hit_p    = hit_q;
        miss_p   = !hit_q;
        state_d  = IDLE;
      end
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      addr_q  <= '0;
      data_q  <= '0;
      hit_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == IDLE && req_p) begin
        addr_q <= addr_p;
        hit_q  <= lk_hit;
        data_q <= we_p ? wdata_p : lk_word;
      end
      if (state_q == WAIT_READ && l2_rd_valid)
        data_q <= l2_rd_line[word_sel(addr_q)*WORD_W +: WORD_W];
    end
  end

  a_fill_only_in_wait_read: assert property (@(posedge clk) disable iff (!rst_n)
                                             l1_fill_en |-> state_q == WAIT_READ);

endmodule
