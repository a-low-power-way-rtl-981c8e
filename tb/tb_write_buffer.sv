// tb_write_buffer: random pushes and pops (never into a full or out of an
// empty buffer), checked against a SystemVerilog queue: order, head value,
// empty and full flags. Full must be reached and must be DEPTH entries.
module tb_write_buffer;
  import cache_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      push = 1'b0, pop = 1'b0;
  wb_entry_t din = '0, dout;
  logic      empty, full;
  wb_entry_t q [$];
  int checks = 0, failures = 0, fulls = 0;

  always #5 clk = ~clk;
  write_buffer dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == WB_DEPTH), "full flag");
      if (full) fulls++;
      if (q.size() > 0) chk(dout == q[0], $sformatf("head %h expected %h", dout, q[0]));
      push = !full && ($urandom_range(0, 99) < (i % 400 < 200 ? 70 : 30));
      pop  = !empty && ($urandom_range(0, 99) < (i % 400 < 200 ? 30 : 70));
      din  = {$urandom, $urandom};
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    chk(fulls > 0, "buffer reached full");
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
