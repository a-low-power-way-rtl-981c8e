// mem_model: behavioural main memory for the cache testbenches (not
// synthesizable). Word-addressed contents live in an associative array;
// a word never written reads as init_word(addr), a fixed hash of its
// address, so no preload is needed. A request (mem_req) is answered after
// LATENCY cycles with a one-cycle mem_ready: a write stores mem_wdata at
// mem_addr, a read returns the 512-bit line that holds mem_addr.
module mem_model
  import cache_pkg::*;
#(
  parameter int LATENCY = 6
) (
  input  logic  clk,
  input  logic  mem_req,
  input  logic  mem_we,
  input  addr_t mem_addr,
  input  word_t mem_wdata,
  output line_t mem_rdata,
  output logic  mem_ready
);
  word_t store [addr_t];
  int    wait_cnt = 0;
  int    n_reads  = 0;
  int    n_writes = 0;

  function automatic word_t init_word(addr_t a);
    return (a >> 2) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  function automatic word_t peek(addr_t a);
    addr_t wa = {a[ADDR_W-1:2], 2'b00};
    return store.exists(wa) ? store[wa] : init_word(wa);
  endfunction

  initial begin
    mem_ready = 1'b0;
    mem_rdata = '0;
  end

  always @(posedge clk) begin
    mem_ready <= 1'b0;
    if (mem_req && !mem_ready) begin
      if (wait_cnt == LATENCY - 1) begin
        wait_cnt  <= 0;
        mem_ready <= 1'b1;
        if (mem_we) begin
          store[{mem_addr[ADDR_W-1:2], 2'b00}] = mem_wdata;
          n_writes++;
        end else begin
          for (int w = 0; w < int'(WORDS); w++)
            mem_rdata[w*WORD_W +: WORD_W] <=
              peek({mem_addr[ADDR_W-1:LINE_LSB], w[OFF_W-1:0], 2'b00});
          n_reads++;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end
endmodule
