// tb_way_tag_cache_top: end-to-end test of the two-level way-tagged PDT
// cache at its default sizes (64-line L1, 4 x 256-set L2, 4-entry write
// buffer), against a behavioural main memory.
//
// A reference model (an associative array of words, with the memory's own
// initial-value hash) tracks every store; every load result is compared
// with it, and at the end every stored word must have reached main memory
// (write-through). Independently of the design, the bench predicts the L2
// access mode of every store from the L1 hit/miss it reports and checks
// the number of ways enabled when the L2 performs that store: one for an
// L1 store hit (direct-mapped), all four for an L1 store miss. It also
// checks that a load hit leaves the L2 idle and takes 2 cycles, and that a
// store takes 4 cycles when the write buffer has room.
// The run: directed cases (cold miss, load hit, store hit/miss, faulty word,
// L2 eviction with L1 back-invalidation, write-buffer stall), then random
// loads and stores over a small address range that causes conflicts.
// Each mechanism is counted and one that never happened is a failure.
module tb_way_tag_cache_top;
  import cache_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  req_p = 1'b0, we_p = 1'b0;
  addr_t addr_p = '0;
  word_t wdata_p = '0, rdata_p;
  logic  ready_p, hit_p, miss_p;
  logic  fm_we = 1'b0, fm_faulty = 1'b0;
  addr_t fm_addr = '0;
  logic  mem_req, mem_we, mem_ready;
  addr_t mem_addr;
  word_t mem_wdata;
  line_t mem_rdata;
  logic [L2_WAYS-1:0] l2_way_en;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  way_tag_cache_top dut (.*);

  mem_model #(.LATENCY(8)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready
  );

  // ---------------- reference model ----------------
  word_t ref_mem [addr_t];
  function automatic word_t ref_rd(addr_t a);
    addr_t wa = {a[ADDR_W-1:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : ((wa >> 2) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_rd_hit = 0, n_rd_miss = 0, n_wr_hit = 0, n_wr_miss = 0;
  int n_l2_rd_hit = 0, n_l2_fill = 0, n_backinv = 0;
  int n_dm_write = 0, n_sa_write = 0, n_bypass = 0, n_wtb_read = 0;
  int n_wb_stall = 0, n_fault_redirect = 0;
  int way_activations = 0, l2_accesses = 0, store_acts = 0, l2_stores = 0;

  // Expected L2 write modes, in store order (1 = direct-mapped).
  bit    exp_dm [$];
  logic  pop_d = 1'b0;
  bit    dm_q;
  logic  l2_busy_in_op;

  always @(posedge clk) if (rst_n) begin
    pop_d <= dut.wb_pop;
    way_activations += $countones(l2_way_en);
    if (dut.wb_pop) begin
      if (dut.u_wtb.empty) n_bypass++; else n_wtb_read++;
    end
    if (pop_d) begin
      l2_accesses++;
      l2_stores++;
      store_acts += $countones(l2_way_en);
      if (exp_dm.size() == 0) check(0, "L2 store with no store outstanding");
      else begin
        dm_q = exp_dm.pop_front();
        check($countones(l2_way_en) == (dm_q ? 1 : L2_WAYS),
              $sformatf("L2 store mode: %0d ways enabled, expected %s",
                        $countones(l2_way_en), dm_q ? "1 (direct)" : "all"));
        if (dm_q) n_dm_write++; else n_sa_write++;
      end
    end
    if (dut.inv_en) begin
      n_backinv++;
    end
    if (dut.u_l1_ctrl.wb_full && dut.u_l1_ctrl.state_q == 4'd7 /* WAIT_WRITE */) n_wb_stall++;
    if (l2_way_en != '0) l2_busy_in_op = 1'b1;
  end

  // Count L2 read hits and fills from the memory traffic and way enables:
  // a line read request that causes no memory line read is an L2 hit.
  int l2_rd_reqs = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.l2_rd_valid) begin
      l2_rd_reqs++;
      l2_accesses++;
    end
  end

  // ---------------- processor driver ----------------
  task automatic op(input bit we, input addr_t a, input word_t d,
                    output word_t r, output bit h, output int cyc);
    @(negedge clk);
    req_p = 1'b1; we_p = we; addr_p = a; wdata_p = d;
    l2_busy_in_op = 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!ready_p && cyc < 2000);
    check(ready_p, "request completed");
    check(hit_p ^ miss_p, "exactly one of hit/miss with ready");
    r = rdata_p; h = hit_p;
    req_p = 1'b0;
    if (we) begin
      ref_mem[{a[ADDR_W-1:2], 2'b00}] = d;
      exp_dm.push_back(h);
      if (h) n_wr_hit++; else n_wr_miss++;
    end else begin
      if (h) n_rd_hit++; else n_rd_miss++;
    end
  endtask

  task automatic load(input addr_t a, output bit h, output int cyc);
    word_t r;
    op(1'b0, a, '0, r, h, cyc);
    check(r == ref_rd(a), $sformatf("load %h: got %h expected %h", a, r, ref_rd(a)));
  endtask

  task automatic store(input addr_t a, input word_t d, output bit h, output int cyc);
    word_t r;
    op(1'b1, a, d, r, h, cyc);
  endtask

  // Fault map as the bench sees it: one bit per L1 word location
  // (L1 index and word), whatever line occupies it.
  bit faulty_loc [logic [9:0]];

  task automatic mark_fault(input addr_t a, input bit f);
    faulty_loc[a[11:2]] = f;
    @(negedge clk);
    fm_we = 1'b1; fm_addr = a; fm_faulty = f;
    @(negedge clk);
    fm_we = 1'b0;
  endtask

  task automatic drain();
    int guard = 0;
    while ((!dut.wb_empty || dut.u_l2.state_q != 3'd0 /* S_IDLE */) && guard < 5000) begin
      @(negedge clk); guard++;
    end
  endtask

  // ---------------- stimulus ----------------
  localparam addr_t A = 32'h0001_2340;     // L1 idx 13, L2 set 141
  bit h; int cyc; int m0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. cold load: L1 miss, L2 miss, fill from memory
    m0 = u_mem.n_reads;
    load(A, h, cyc);
    check(!h, "cold load misses");
    check(u_mem.n_reads == m0 + 1, "cold load reads one line from memory");
    n_l2_fill += u_mem.n_reads - m0;

    // 2. load hit: 2 cycles, L2 idle
    load(A + 4, h, cyc);
    check(h, "second load of the line hits");
    check(cyc == 1, $sformatf("load hit latency %0d+1 cycles, expected 2", cyc));
    check(!l2_busy_in_op, "load hit does not access the L2");

    // 3. store hit: direct-mapped L2 write, 4 cycles
    store(A + 8, 32'hABCD_0123, h, cyc);
    check(h, "store to cached line hits");
    check(cyc == 3, $sformatf("store latency %0d+1 cycles, expected 4", cyc));
    load(A + 8, h, cyc);
    check(h, "load after store hit hits");

    // 4. store miss: set-associative L2 write, no L1 allocation
    store(32'h0004_0000, 32'h1234_5678, h, cyc);
    check(!h, "store to uncached line misses");
    load(32'h0004_0000, h, cyc);
    check(!h, "store miss does not allocate in the L1");

    // 5. faulty word: load of a cached but faulty word is served by the L2
    drain();
    mark_fault(A + 8, 1'b1);
    m0 = u_mem.n_reads;
    load(A + 8, h, cyc);
    check(!h, "load of faulty word reported as miss");
    check(u_mem.n_reads == m0, "faulty word served by the L2, not memory");
    n_fault_redirect++;
    load(A + 12, h, cyc);
    check(h, "neighbouring good word still hits");
    store(A + 8, 32'hFEED_BEEF, h, cyc);
    check(h, "store to faulty word is a hit (way tag valid)");
    load(A + 8, h, cyc);
    check(!h, "faulty word still redirected after store");
    mark_fault(A + 8, 1'b0);

    // 6. L2 eviction: five lines of one L2 set -> the first is evicted and
    //    back-invalidated in the L1 (same L1 index).
    for (int i = 1; i <= 4; i++) begin
      m0 = u_mem.n_reads;
      load(A + 32'(i) * 32'h4000, h, cyc);    // same L2 set, same L1 index
      n_l2_fill += u_mem.n_reads - m0;
    end
    check(n_backinv >= 1, "fifth line into a full L2 set evicts a valid line");
    m0 = u_mem.n_reads;
    load(A, h, cyc);
    check(!h, "line evicted from the L2 is gone from the L1");
    check(u_mem.n_reads == m0 + 1, "evicted line is re-read from memory");
    n_l2_fill += u_mem.n_reads - m0;

    // 7. L2 read hit: line in L2 but replaced in L1 by a conflicting line
    load(A + 32'h1000, h, cyc);              // L1 idx 13 again, other L2 set
    m0 = u_mem.n_reads;
    load(A, h, cyc);
    check(!h && u_mem.n_reads == m0, "L1 miss served by an L2 hit");
    n_l2_rd_hit += (u_mem.n_reads == m0);

    // 8. write-buffer stall: back-to-back stores faster than memory
    for (int i = 0; i < 12; i++) store(A + 32'(4 * (i % 16)), 32'hC0DE_0000 + i, h, cyc);
    drain();

    // 9. random traffic
    for (int i = 0; i < 3000; i++) begin
      addr_t a;
      int    mr;
      mr = u_mem.n_reads;
      // 80 %: a 48-line working set that fits the L1; 20 %: lines that
      // collide in the L1 and the L2 (16 tags per L2 set).
      if ($urandom_range(0, 99) < 80)
        a = 32'h0010_0000 + {20'h0, 6'($urandom_range(0, 47)), 4'($urandom), 2'b00};
      else
        a = {14'h0, 4'($urandom), 8'($urandom_range(0, 15)), 4'($urandom), 2'b00};
      if ($urandom_range(0, 99) < 3) mark_fault(a, $urandom_range(0, 1) == 1);
      if ($urandom_range(0, 99) < 40) store(a, $urandom, h, cyc);
      else begin
        load(a, h, cyc);
        if (faulty_loc.exists(a[11:2]) && faulty_loc[a[11:2]]) begin
          check(!h, $sformatf("load of faulty word %h must not hit", a));
          n_fault_redirect++;
        end
        if (!h) begin
          if (u_mem.n_reads == mr) n_l2_rd_hit++; else n_l2_fill++;
        end
      end
    end
    drain();

    // write-through: every stored word reached main memory
    foreach (ref_mem[k]) check(u_mem.peek(k) == ref_mem[k],
                               $sformatf("memory word %h = %h, expected %h",
                                         k, u_mem.peek(k), ref_mem[k]));
    check(exp_dm.size() == 0, "every store reached the L2");

    $display("mechanisms: load hit %0d, load miss %0d, store hit %0d, store miss %0d",
             n_rd_hit, n_rd_miss, n_wr_hit, n_wr_miss);
    $display("            L2 read hit %0d, L2 fill %0d, back-invalidation %0d",
             n_l2_rd_hit, n_l2_fill, n_backinv);
    $display("            direct-mapped L2 store %0d, set-assoc L2 store %0d",
             n_dm_write, n_sa_write);
    $display("            way-tag bypass %0d, way-tag buffer read %0d, wb-full stall cycles %0d, faulty-word redirect %0d",
             n_bypass, n_wtb_read, n_wb_stall, n_fault_redirect);
    $display("            L2 way activations %0d over %0d L2 accesses (all-ways: %0d)",
             way_activations, l2_accesses, l2_accesses * L2_WAYS);
    check(n_rd_hit > 0,    "mechanism: load hit");
    check(n_rd_miss > 0,   "mechanism: load miss");
    check(n_wr_hit > 0,    "mechanism: store hit");
    check(n_wr_miss > 0,   "mechanism: store miss");
    check(n_l2_rd_hit > 0, "mechanism: L2 read hit");
    check(n_l2_fill > 0,   "mechanism: L2 fill from memory");
    check(n_backinv > 0,   "mechanism: back-invalidation");
    check(n_dm_write > 0,  "mechanism: direct-mapped L2 store");
    check(n_sa_write > 0,  "mechanism: set-associative L2 store");
    check(n_bypass > 0,    "mechanism: way-tag buffer bypass");
    check(n_wtb_read > 0,  "mechanism: way-tag buffer read");
    check(n_wb_stall > 0,  "mechanism: write-buffer-full stall");
    check(n_fault_redirect > 0, "mechanism: faulty-word redirect");
    $display("            L2 store way activations %0d over %0d stores (all-ways: %0d)",
             store_acts, l2_stores, l2_stores * L2_WAYS);
    check(store_acts == n_dm_write + L2_WAYS * n_sa_write, "store way activations add up");
    check(store_acts < l2_stores * L2_WAYS, "way tags save way activations on stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
