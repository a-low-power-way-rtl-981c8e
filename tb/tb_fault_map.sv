// tb_fault_map: marks random L1 words faulty or good and compares FMOut for
// random addresses with a reference bit map; checks the map is all good
// after reset.
module tb_fault_map;
  import cache_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  we = 1'b0, wr_faulty = 1'b0;
  addr_t wr_addr = '0, rd_addr = '0;
  logic  fm_out;
  bit    ref_map [L1_LINES*WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fault_map dut (.*);

  function automatic int key(addr_t a);
    return int'(a[LINE_LSB +: 6]) * WORDS + int'(word_sel(a));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      rd_addr = $urandom; #1;
      checks++;
      if (fm_out) begin failures++; $display("FAIL: word faulty after reset"); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      wr_addr = $urandom;
      wr_faulty = ($urandom_range(0, 2) != 0);
      rd_addr = (i % 2 == 0) ? wr_addr : addr_t'($urandom);
      #1;
      checks++;
      if (fm_out != ref_map[key(rd_addr)]) begin
        failures++;
        $display("FAIL: fm_out(%h)=%b expected %b", rd_addr, fm_out, ref_map[key(rd_addr)]);
      end
      @(posedge clk);
      if (we) ref_map[key(wr_addr)] = wr_faulty;
    end
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
