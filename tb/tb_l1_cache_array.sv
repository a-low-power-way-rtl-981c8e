// tb_l1_cache_array: random fills, word writes, invalidations and lookups
// on a small address space (so that lines conflict), checked against a
// reference model of a direct-mapped cache: hit flag and word on every
// lookup; invalidation only of the line that holds the given address;
// fill wins over an invalidation of the same line in the same cycle.
module tb_l1_cache_array;
  import cache_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  addr_t lk_addr = '0, wr_addr = '0, fill_addr = '0, inv_addr = '0;
  logic  lk_hit, wr_en = 1'b0, fill_en = 1'b0, inv_en = 1'b0;
  word_t lk_word, wr_data = '0;
  line_t fill_line = '0;

  bit    r_valid [L1_LINES];
  logic [19:0] r_tag [L1_LINES];
  line_t r_data [L1_LINES];
  int checks = 0, failures = 0, hits = 0, invs = 0;

  always #5 clk = ~clk;
  l1_cache_array dut (.*);

  function automatic addr_t rnd_addr();
    return {12'h0, 6'($urandom_range(0, 3)), 2'b00, 6'($urandom), 4'($urandom), 2'b00};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      int    li;
      @(negedge clk);
      lk_addr = rnd_addr();
      #1;
      li = int'(lk_addr[11:6]);
      checks++;
      if (lk_hit != (r_valid[li] && r_tag[li] == lk_addr[31:12])) begin
        failures++; $display("FAIL: hit(%h)=%b", lk_addr, lk_hit);
      end else if (lk_hit) begin
        hits++;
        checks++;
        if (lk_word != r_data[li][word_sel(lk_addr)*32 +: 32]) begin
          failures++; $display("FAIL: word(%h)=%h", lk_addr, lk_word);
        end
      end
      fill_en = $urandom_range(0, 99) < 25;
      fill_addr = rnd_addr();
      for (int w = 0; w < 16; w++) fill_line[w*32 +: 32] = $urandom;
      wr_en = !fill_en && $urandom_range(0, 99) < 40;
      wr_addr = rnd_addr();
      wr_data = $urandom;
      inv_en = $urandom_range(0, 99) < 20;
      inv_addr = $urandom_range(0, 1) == 1 ? lk_addr : rnd_addr();
      @(posedge clk);
      begin
        int ii;
        ii = int'(inv_addr[11:6]);
        if (inv_en && r_valid[ii] && r_tag[ii] == inv_addr[31:12]) begin
          r_valid[ii] = 1'b0; invs++;
        end
      end
      if (fill_en) begin
        r_valid[fill_addr[11:6]] = 1'b1;
        r_tag[fill_addr[11:6]]   = fill_addr[31:12];
        r_data[fill_addr[11:6]]  = fill_line;
      end else if (wr_en) begin
        r_data[wr_addr[11:6]][word_sel(wr_addr)*32 +: 32] = wr_data;
      end
      #1 fill_en = 1'b0; wr_en = 1'b0; inv_en = 1'b0;
    end
    checks++;
    if (hits < 100 || invs < 20) begin failures++; $display("FAIL: too few hits/invalidations"); end
    $display("hits %0d invalidations %0d", hits, invs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
