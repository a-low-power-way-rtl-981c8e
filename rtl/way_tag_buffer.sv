// way_tag_buffer: FIFO of L2 way tags that travels beside the write buffer,
// plus the bypass multiplexer that removes its one-cycle lag.
//
// Each entry holds the 2-bit way tag of a buffered store and a status bit
// that is set when the store missed in the L1 (its way is then unknown and
// the L2 must search all ways). The buffer has as many entries as the write
// buffer and shares its control signals:
//   * write: the store enters the write buffer in cycle N (wb_push) and the
//     way-tag array is read in the same cycle, so its tag is on way_in in
//     cycle N+1. The buffer's write enable is wb_push delayed by one clock;
//     the status bit (miss_in, given with wb_push) is delayed with it.
//   * read: the write buffer's read signal (rd). EMPTY gates the read: when
//     the buffer is empty the entry is taken straight from the way-tag array
//     output through the bypass multiplexer and is not stored.
// way_out/miss_out always show what the L2 receives with the write buffer's
// head; avail says that a tag is there (stored, or arriving this cycle).
module way_tag_buffer
  import cache_pkg::*;
#(
  parameter int unsigned DEPTH    = WB_DEPTH,
  parameter int unsigned TAG_BITS = WAY_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wb_push,
  input  logic                miss_in,
  input  logic [TAG_BITS-1:0] way_in,
  input  logic                rd,
  output logic [TAG_BITS-1:0] way_out,
  output logic                miss_out,
  output logic                empty,
  output logic                avail
);
  localparam int unsigned PTR_W = $clog2(DEPTH);

  typedef struct packed {
    logic                miss;
    logic [TAG_BITS-1:0] way;
  } wt_entry_t;

  wt_entry_t        mem_q [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             we_d, miss_d;
  logic             bypass, do_wr, do_rd;
  wt_entry_t        incoming;

  // Write signal = write buffer's write signal delayed by one clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_d   <= 1'b0;
      miss_d <= 1'b0;
    end else begin
      we_d   <= wb_push;
      miss_d <= miss_in;
    end
  end

  assign incoming = '{miss: miss_d, way: way_in};
  assign empty    = (count == 0);
  assign avail    = !empty || we_d;
  assign bypass   = empty;                 // EMPTY disables the read port
  assign do_rd    = rd && !empty;
  assign do_wr    = we_d && !(rd && bypass);

  assign way_out  = bypass ? incoming.way  : mem_q[rd_ptr].way;
  assign miss_out = bypass ? incoming.miss : mem_q[rd_ptr].miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == PTR_W'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == PTR_W'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PTR_W+1)'(do_wr) - (PTR_W+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem_q[wr_ptr] <= incoming;
  end

  // A read needs a tag: stored, or arriving through the bypass.
  a_rd_has_tag: assert property (@(posedge clk) disable iff (!rst_n) rd |-> avail);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  do_wr |-> (count != (PTR_W+1)'(DEPTH)) || do_rd);

endmodule
