// way_decoder: turns an L2 access and its way tag into the way enables of
// the L2 tag and data arrays.
//
// Access modes (L1 operation -> L2 mode):
//   read hit   -> no access, no enable
//   read miss  -> set-associative, every way enabled   (rd_miss)
//   write hit  -> direct-mapped, only way `way` enabled (wr, !wr_miss)
//   write miss -> set-associative, every way enabled   (wr, wr_miss)
// fill selects a single way for a line fill from memory (one-hot of `way`).
// Purely combinational.
module way_decoder
  import cache_pkg::*;
#(
  parameter int unsigned WAYS = L2_WAYS
) (
  input  logic                    wr,
  input  logic                    wr_miss,
  input  logic                    rd_miss,
  input  logic                    fill,
  input  logic [$clog2(WAYS)-1:0] way,
  output logic [WAYS-1:0]         way_en
);
  always_comb begin
    way_en = '0;
    if (rd_miss || (wr && wr_miss))
      way_en = '1;
    else if (wr || fill)
      way_en[way] = 1'b1;
  end
endmodule
