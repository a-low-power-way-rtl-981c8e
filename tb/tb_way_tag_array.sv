// tb_way_tag_array: random mix of the four WRITEH_W/UPDATE combinations.
// A write stores the tag, a read returns the stored tag one clock later,
// and "no access" leaves the output unchanged; compared with a reference
// array.
module tb_way_tag_array;
  import cache_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  writeh_w = 1'b0, update = 1'b0;
  addr_t addr = '0;
  logic [1:0] way_in = '0, way_out, exp_out;
  logic [1:0] ref_tags [L1_LINES];
  bit         written [L1_LINES];
  int checks = 0, failures = 0, reads = 0;

  always #5 clk = ~clk;
  way_tag_array dut (.*);

  initial begin
    exp_out = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      {writeh_w, update} = 2'($urandom);
      addr = $urandom;
      way_in = 2'($urandom);
      // read only lines that were written
      if (writeh_w && !update && !written[addr[LINE_LSB +: 6]]) update = 1'b1;
      @(posedge clk);
      if (writeh_w && update) begin
        ref_tags[addr[LINE_LSB +: 6]] = way_in;
        written[addr[LINE_LSB +: 6]] = 1'b1;
      end else if (writeh_w) begin
        exp_out = ref_tags[addr[LINE_LSB +: 6]];
        reads++;
      end
      #1;
      checks++;
      if (way_out != exp_out) begin
        failures++;
        $display("FAIL: way_out=%0d expected %0d (writeh=%b update=%b)", way_out, exp_out,
                 writeh_w, update);
      end
    end
    checks++;
    if (reads < 100) failures++;
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
