// tb_l2_cache: the L2 on its own, with a behavioural memory. The bench
// plays the L1 side: it issues line reads and queues stores (address, data,
// way tag, write-miss status) as the write buffer / way-tag buffer would.
// It remembers the way tag returned for every line it read and forgets it
// when the L2 back-invalidates that line; a store to a remembered line is
// sent direct-mapped with that tag, any other store as a write miss.
// Checks: returned lines equal a reference memory with all stores applied;
// one way enabled for a direct-mapped store, all for a write miss and for a
// read lookup; a line evicted (back-invalidated) is re-read from memory;
// every store reaches memory; reads wait for queued stores.
module tb_l2_cache;
  import cache_pkg::*;
  localparam int SETS = 4;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  rd_req = 1'b0, rd_valid;
  addr_t rd_addr = '0;
  line_t rd_line;
  logic [1:0] rd_way;
  logic  wb_empty, wt_avail, wt_miss, wb_pop;
  wb_entry_t wb_head;
  logic [1:0] wt_way;
  logic  inv_en;
  addr_t inv_addr;
  logic  mem_req, mem_we, mem_ready;
  addr_t mem_addr;
  word_t mem_wdata;
  line_t mem_rdata;
  logic [3:0] way_en;

  typedef struct { wb_entry_t e; logic [1:0] way; logic miss; } st_t;
  st_t   sq [$];
  word_t ref_mem [addr_t];
  logic [1:0] way_of [addr_t];     // line address -> way tag
  int checks = 0, failures = 0;
  int n_dm = 0, n_sa = 0, n_inv = 0, n_rd_hit = 0, n_rd_miss = 0;
  logic pop_d = 1'b0, exp_dm_d = 1'b0;

  always #5 clk = ~clk;

  // The popped store leaves the queue at the falling edge, after the L2
  // has sampled it.
  always @(negedge clk) if (pop_d) void'(sq.pop_front());

  // The lookup cycle of a line read (state S_RLOOK) must enable every way.
  bit saw_all = 1'b0;
  always @(negedge clk) if (rst_n && dut.state_q == 3'd3) begin
    saw_all = 1'b1;
    chk($countones(way_en) == 4, "read lookup enables all ways");
  end

  l2_cache #(.SETS(SETS)) dut (.*);
  mem_model #(.LATENCY(3)) u_mem (.*);

  assign wb_empty = (sq.size() == 0);
  assign wt_avail = !wb_empty;
  assign wb_head  = wb_empty ? '0 : sq[0].e;
  assign wt_way   = wb_empty ? '0 : sq[0].way;
  assign wt_miss  = wb_empty ? 1'b0 : sq[0].miss;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  function automatic word_t ref_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : ((wa >> 2) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F);
  endfunction

  function automatic addr_t line_of(addr_t a);
    return {a[31:6], 6'b0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    pop_d <= wb_pop;
    if (wb_pop) exp_dm_d <= !wt_miss;
    if (pop_d) begin
      chk($countones(way_en) == (exp_dm_d ? 1 : 4),
          $sformatf("store enabled %0d ways (direct=%b)", $countones(way_en), exp_dm_d));
      if (exp_dm_d) n_dm++; else n_sa++;
    end
    if (inv_en) begin
      chk(way_of.exists(inv_addr), $sformatf("invalidation of unknown line %h", inv_addr));
      way_of.delete(inv_addr);
      n_inv++;
    end
  end

  task automatic do_store(input addr_t a, input word_t d);
    st_t s;
    s.e = '{addr: a, data: d};
    s.miss = !way_of.exists(line_of(a));
    s.way  = s.miss ? 2'($urandom) : way_of[line_of(a)];
    ref_mem[{a[31:2], 2'b00}] = d;
    @(negedge clk);
    sq.push_back(s);
  endtask

  task automatic do_read(input addr_t a);
    int cyc = 0, mr;
    mr = u_mem.n_reads;
    saw_all = 1'b0;
    @(negedge clk);
    rd_req = 1'b1; rd_addr = a;
    while (!rd_valid && cyc < 500) begin
      @(posedge clk);
      chk(!(rd_valid && sq.size() != 0), "read answered before stores drained");
      #1; cyc++;
    end
    chk(rd_valid, "read answered");
    for (int w = 0; w < 16; w++)
      chk(rd_line[w*32 +: 32] == ref_rd(line_of(a) + 32'(4*w)),
          $sformatf("line %h word %0d = %h expected %h", a, w, rd_line[w*32 +: 32],
                    ref_rd(line_of(a) + 32'(4*w))));
    if (way_of.exists(line_of(a))) chk(rd_way == way_of[line_of(a)], "line stays in its way");
    if (u_mem.n_reads == mr) n_rd_hit++; else n_rd_miss++;
    @(posedge clk); // take the result, incl. a same-cycle invalidation
    chk(saw_all, "read looked up");
    way_of[line_of(a)] = rd_way;
    @(negedge clk);
    rd_req = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      addr_t a;
      a = {15'h0, 3'($urandom), 6'h0, 2'($urandom), 4'($urandom), 2'b00};
      if ($urandom_range(0, 99) < 55 && sq.size() < WB_DEPTH) do_store(a, $urandom);
      else do_read(a);
    end
    while (sq.size() != 0 || dut.state_q != 3'd0) @(negedge clk);
    foreach (ref_mem[k]) chk(u_mem.peek(k) == ref_mem[k], $sformatf("memory %h", k));
    chk(n_dm > 0 && n_sa > 0 && n_inv > 0 && n_rd_hit > 0 && n_rd_miss > 0, "all modes seen");
    $display("direct %0d set-assoc %0d invalidations %0d read hits %0d read misses %0d",
             n_dm, n_sa, n_inv, n_rd_hit, n_rd_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
