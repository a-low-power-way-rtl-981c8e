// tb_pdt_l1_controller: the L1 controller against modelled arrays, fault
// map, write buffer and L2. For each random request the bench chooses
// whether the line is in the L1, whether the word is faulty, how long the
// L2 takes and how long the write buffer stays full, then follows the
// controller cycle by cycle and checks, per request type:
//   load hit    : ready after 2 cycles, hit, L1 word returned, no L2 read
//   load miss   : (also a hit on a faulty word) L2 read held until answered;
//                 in that cycle line fill + way-tag write (WRITEH_W=1,
//                 UPDATE=1) with the L2's way; word taken from the L2 line;
//                 ready 2 cycles after the answer, miss
//   store       : waits while the write buffer is full; in the ready cycle
//                 one write-buffer push of {addr,data}, L1 word write only
//                 on a hit, way-tag read (WRITEH_W=1, UPDATE=0), write-miss
//                 status = !hit; latency 4 cycles + full cycles
module tb_pdt_l1_controller;
  import cache_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  req_p = 1'b0, we_p = 1'b0;
  addr_t addr_p = '0, lk_addr, l2_rd_addr;
  word_t wdata_p = '0, rdata_p, lk_word, l1_wr_data;
  logic  ready_p, hit_p, miss_p, lk_hit, fm_out;
  logic  l1_wr_en, l1_fill_en, writeh_w, update, wb_push, wb_status_miss, wb_full;
  line_t l1_fill_line, l2_rd_line = '0;
  logic [1:0] wt_way_in, l2_rd_way = '0;
  wb_entry_t wb_din;
  logic  l2_rd_req, l2_rd_valid;

  bit    m_hit, m_fm;
  word_t m_word;
  int    l2_lat, full_cycles;
  int    checks = 0, failures = 0;
  int    n_rh = 0, n_rm = 0, n_fault = 0, n_wh = 0, n_wm = 0, n_stall = 0;

  always #5 clk = ~clk;
  pdt_l1_controller dut (.*);

  assign lk_hit  = m_hit;
  assign fm_out  = m_fm;
  assign lk_word = m_word;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    l2_rd_valid = 1'b0;
    wb_full = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int cyc, pushes, fills, wt_reads, wt_writes, l2_req_cyc, answered_at;
      bit want_we;
      word_t exp;
      cyc = 0; pushes = 0; fills = 0; wt_reads = 0; wt_writes = 0; l2_req_cyc = 0;
      answered_at = -1;
      want_we = $urandom_range(0, 1) == 1;
      m_hit = $urandom_range(0, 99) < 60;
      m_fm = $urandom_range(0, 99) < 15;
      m_word = $urandom;
      l2_lat = $urandom_range(1, 6);
      full_cycles = $urandom_range(0, 3) == 0 ? $urandom_range(1, 5) : 0;
      for (int w = 0; w < 16; w++) l2_rd_line[w*32 +: 32] = $urandom;
      l2_rd_way = 2'($urandom);
      @(negedge clk);
      req_p = 1'b1; we_p = want_we; addr_p = $urandom; wdata_p = $urandom;
      wb_full = full_cycles > 0;
      do begin
        @(negedge clk);
        cyc++;
        // modelled L2: answer l2_lat cycles after the request (at least 1)
        if (l2_rd_req) begin
          l2_req_cyc++;
          chk(l2_rd_addr == addr_p, "L2 read address");
        end
        l2_rd_valid = l2_rd_req && l2_req_cyc > l2_lat && answered_at < 0;
        if (l2_rd_valid) answered_at = cyc;
        if (cyc >= full_cycles) wb_full = 1'b0;
        #1;
        if (l1_fill_en) begin
          fills++;
          chk(l2_rd_valid && writeh_w && update && wt_way_in == l2_rd_way && l1_fill_line == l2_rd_line,
              "fill with way-tag write");
        end
        if (wb_push) begin
          pushes++;
          chk(wb_din.addr == addr_p && wb_din.data == wdata_p, "write buffer entry");
          chk(wb_status_miss == !m_hit, "write-miss status");
          chk(l1_wr_en == m_hit && l1_wr_data == wdata_p, "L1 word write only on a hit");
          chk(writeh_w && !update, "way-tag array read with the store");
          chk(!wb_full, "push only when the write buffer has room");
        end else chk(!l1_wr_en, "L1 write only with the push");
        if (writeh_w && !update) wt_reads++;
        if (writeh_w && update) wt_writes++;
      end while (!ready_p && cyc < 100);
      chk(ready_p, "request completes");
      if (!want_we && m_hit && !m_fm) begin
        n_rh++;
        chk(cyc == 1 && hit_p && !miss_p && rdata_p == m_word && l2_req_cyc == 0 && fills == 0,
            "load hit");
      end else if (!want_we) begin
        n_rm++; if (m_hit) n_fault++;
        exp = l2_rd_line[word_sel(addr_p)*32 +: 32];
        chk(miss_p && !hit_p && rdata_p == exp && fills == 1 && wt_writes == 1 && wt_reads == 0,
            "load miss served from the L2 line");
        chk(cyc == answered_at + 1, $sformatf("load miss ready %0d cycles after L2 answer", cyc - answered_at));
      end else begin
        if (m_hit) n_wh++; else n_wm++;
        if (full_cycles > 2) n_stall++;
        chk(hit_p == m_hit && miss_p == !m_hit, "store hit/miss");
        chk(pushes == 1 && wt_reads == 1 && fills == 0 && l2_req_cyc == 0, "store side effects");
        chk(cyc == (full_cycles > 2 ? full_cycles + 1 : 3),
            $sformatf("store latency %0d (full %0d)", cyc, full_cycles));
      end
      req_p = 1'b0;
      l2_rd_valid = 1'b0;
    end
    chk(n_rh > 0 && n_rm > 0 && n_fault > 0 && n_wh > 0 && n_wm > 0 && n_stall > 0, "all cases");
    $display("load hit %0d load miss %0d (faulty %0d) store hit %0d store miss %0d stalled %0d",
             n_rh, n_rm, n_fault, n_wh, n_wm, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
