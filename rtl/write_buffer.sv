// write_buffer: FIFO that holds write-through stores on their way from the
// L1 data cache to the L2.
//
// A store is pushed in the cycle it writes the L1 (push, din); the L2 takes
// the oldest entry with pop while dout shows it (first-word fall-through).
// full tells the L1 controller to wait; pushing when full or popping when
// empty is a protocol error (asserted). Depth is DEPTH entries (4 is this
// design's choice; the way-tag buffer must be given the same depth).
module write_buffer
  import cache_pkg::*;
#(
  parameter int unsigned DEPTH = WB_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  wb_entry_t din,
  input  logic      pop,
  output wb_entry_t dout,
  output logic      empty,
  output logic      full
);
  localparam int unsigned PTR_W = $clog2(DEPTH);

  wb_entry_t        mem_q [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (PTR_W+1)'(DEPTH));
  assign dout  = mem_q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PTR_W'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PTR_W'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
