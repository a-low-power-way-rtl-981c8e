// way_tag_array: for every L1 line, the 2-bit tag of the L2 way that holds
// its copy.
//
// The array shares its index with the L1 data array. Because the L2 is
// inclusive and a line never moves between L2 ways while it is cached, the
// tag stays correct for as long as the line is in L1. Operations follow the
// WRITEH/UPDATE table of the way-tagged cache:
//   writeh_w update   operation
//     1        1      write: store way_in for the line at addr (L1 fill)
//     1        0      read:  way_out <= tag of the line at addr (store)
//     0        x      no access, way_out holds
// The read is synchronous: the tag appears on way_out one clock after the
// store reaches the L1, which is why the way-tag buffer is written one cycle
// after the write buffer. Contents are not reset: a tag is only read for a
// line that was filled, a store miss ignores it.
module way_tag_array
  import cache_pkg::*;
#(
  parameter int unsigned LINES = L1_LINES,
  parameter int unsigned TAG_BITS = WAY_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                writeh_w,
  input  logic                update,
  input  addr_t               addr,
  input  logic [TAG_BITS-1:0] way_in,
  output logic [TAG_BITS-1:0] way_out
);
  localparam int unsigned IDX_W = $clog2(LINES);

  logic [TAG_BITS-1:0] tags_q [LINES];
  logic [IDX_W-1:0]    idx;
  assign idx = addr[LINE_LSB +: IDX_W];

  always_ff @(posedge clk) begin
    if (writeh_w && update) tags_q[idx] <= way_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  way_out <= '0;
    else if (writeh_w && !update) way_out <= tags_q[idx];
  end

endmodule
