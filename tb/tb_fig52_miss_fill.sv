// tb_fig52_miss_fill: the basic miss operation at full size. A load of
// 0xABCD0123 misses in the L1 and in the L2; the line is read from memory
// and written into the L1 and the L2 in the same clock cycle, and the
// word goes to the processor. The bench then shows that both levels hold
// the line: a second load hits in the L1 (2 cycles, no L2 activity); after
// a conflicting line pushes it out of the L1, a third load is served by an
// L2 hit with no memory read.
module tb_fig52_miss_fill;
  import cache_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
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
  int same_cycle_fills = 0, l2_active = 0;

  always #5 clk = ~clk;
  way_tag_cache_top dut (.*);
  mem_model #(.LATENCY(10)) u_mem (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // L1 fill and L2 fill (one way enabled, line from memory) in one cycle
  always @(negedge clk) begin
    if (dut.l1_fill_en && dut.u_l2.state_q == 3'd5 /* S_FILL */ && $countones(l2_way_en) == 1)
      same_cycle_fills++;
    if (l2_way_en != '0) l2_active++;
  end

  task automatic load(input addr_t a, output word_t r, output bit h, output int cyc);
    @(negedge clk);
    req_p = 1'b1; we_p = 1'b0; addr_p = a;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!ready_p && cyc < 1000);
    r = rdata_p; h = hit_p;
    req_p = 1'b0;
  endtask

  localparam addr_t A = 32'hABCD_0123;
  word_t r; bit h; int cyc, m0, act0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    load(A, r, h, cyc);
    chk(!h, "first load misses in L1");
    chk(u_mem.n_reads == 1, "line read from memory (L2 miss)");
    chk(r == u_mem.peek(A), $sformatf("load data %h expected %h", r, u_mem.peek(A)));
    chk(same_cycle_fills == 1, "line written into L1 and L2 in the same cycle");
    $display("miss in L1 and L2: %0d cycles with a %0d-cycle memory", cyc + 1, 10);

    act0 = l2_active;
    load(A + 4, r, h, cyc);
    chk(h && cyc == 1 && l2_active == act0, "L1 holds the line: 2-cycle hit, L2 idle");
    chk(r == u_mem.peek(A + 4), "hit data");

    load(A + 32'h1000, r, h, cyc);           // same L1 line index, other L2 set
    chk(!h, "conflicting line misses");
    m0 = u_mem.n_reads;
    load(A, r, h, cyc);
    chk(!h && u_mem.n_reads == m0, "L2 holds the line: L1 miss served without memory");
    chk(r == u_mem.peek(A), "L2 hit data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
