// tb_way_tag_buffer: drives the buffer the way the cache does. A store
// enters the write buffer in cycle N (wb_push, with its miss status); its
// way tag appears on way_in in cycle N+1, as from the way-tag array. A
// reader pops whenever a modelled write buffer holds entries. Every popped
// tag/status must equal the store's, in order; avail must track the write
// buffer; both the bypass (pop while the buffer is empty) and a normal
// buffered read must happen. The buffer must never need more entries than
// the write buffer has.
module tb_way_tag_buffer;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wb_push = 1'b0, miss_in = 1'b0, rd = 1'b0;
  logic [1:0] way_in = '0, way_out;
  logic miss_out, empty, avail;

  typedef struct packed { logic miss; logic [1:0] way; } ent_t;
  ent_t q [$];
  ent_t last_push;
  bit   pushed_last = 1'b0;
  int   wb_count = 0;
  int   checks = 0, failures = 0, n_bypass = 0, n_buffered = 0;

  always #5 clk = ~clk;
  way_tag_buffer dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // tag of last cycle's store arrives now
      way_in = pushed_last ? last_push.way : 2'($urandom);
      chk(avail == (wb_count > 0), $sformatf("avail=%b with %0d buffered stores", avail, wb_count));
      wb_push = (wb_count < WB_DEPTH) && ($urandom_range(0, 99) < (i % 300 < 150 ? 60 : 25));
      miss_in = $urandom_range(0, 1) == 1;
      rd = (wb_count > 0) && ($urandom_range(0, 99) < (i % 300 < 150 ? 25 : 70));
      #1;
      if (rd) begin
        chk(q.size() > 0 && {miss_out, way_out} == q[0],
            $sformatf("read %b/%0d expected %b/%0d", miss_out, way_out, q[0].miss, q[0].way));
        if (empty) n_bypass++; else n_buffered++;
      end
      @(posedge clk);
      pushed_last = wb_push;
      if (wb_push) begin
        last_push = '{miss: miss_in, way: 2'($urandom)};
        q.push_back(last_push);
      end
      if (rd) void'(q.pop_front());
      wb_count += int'(wb_push) - int'(rd);
    end
    chk(n_bypass > 0, "bypass used");
    chk(n_buffered > 0, "buffered read used");
    $display("bypass reads %0d, buffered reads %0d", n_bypass, n_buffered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
