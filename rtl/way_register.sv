// way_register: holds one way tag per L2 way ("00", "01", "10", "11" for
// four ways) and sends the tag of the way that supplies a line to the L1,
// where it is stored in the way-tag array.
//
// The tags are loaded into the register at reset (tag i for way i). sel is
// the one-hot vector of the way that hit or was filled; way_tag is the tag
// held for it and valid says that sel selected a way. Combinational read.
module way_register
  import cache_pkg::*;
#(
  parameter int unsigned WAYS = L2_WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [WAYS-1:0]         sel,
  output logic [$clog2(WAYS)-1:0] way_tag,
  output logic                    valid
);
  localparam int unsigned TW = $clog2(WAYS);

  logic [TW-1:0] tag_q [WAYS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      for (int i = 0; i < int'(WAYS); i++) tag_q[i] <= TW'(i);
    else
      for (int i = 0; i < int'(WAYS); i++) tag_q[i] <= tag_q[i];
  end

  always_comb begin
    way_tag = '0;
    for (int i = 0; i < int'(WAYS); i++)
      if (sel[i]) way_tag = way_tag | tag_q[i];
  end
  assign valid = |sel;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));

endmodule
