// fault_map: one bit per L1 data word saying whether that word is known to
// be faulty. Its read port gives FMOut for the word a request looks up.
//
// A performance-degradation-tolerant (PDT) cache keeps a chip with faulty L1
// words usable: a read of a word marked faulty is handled as an L1 miss and
// served by the fault-free L2, so a functional fault becomes a few cycles of
// extra latency. The design only names FMOut and says that BIST or ECC finds
// the faults; how the map is stored and filled is this design's choice: a
// flip-flop array, cleared at reset (all words good), written one bit at a
// time through a port that a BIST engine or ECC checker would drive.
//
// Interface: write port (we, wr_addr, wr_faulty) takes effect at the next
// rising clock edge; read port (rd_addr -> fm_out) is combinational.
module fault_map
  import cache_pkg::*;
#(
  parameter int unsigned LINES = L1_LINES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  addr_t wr_addr,
  input  logic  wr_faulty,
  input  addr_t rd_addr,
  output logic  fm_out
);
  localparam int unsigned IDX_W = $clog2(LINES);

  logic [WORDS-1:0] map_q [LINES];

  logic [IDX_W-1:0] wr_idx, rd_idx;
  assign wr_idx = wr_addr[LINE_LSB +: IDX_W];
  assign rd_idx = rd_addr[LINE_LSB +: IDX_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LINES); i++) map_q[i] <= '0;
    end else if (we) begin
      map_q[wr_idx][word_sel(wr_addr)] <= wr_faulty;
    end
  end

  assign fm_out = map_q[rd_idx][word_sel(rd_addr)];

endmodule
