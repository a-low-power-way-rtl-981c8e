// tb_l2_way_array: random fills, word writes and lookups on one L2 way,
// with the way enable toggled at random. Checked against a reference: a
// disabled way reports no hit, zero data and ignores writes; an enabled
// way reports hit, valid, stored tag and line as the reference says.
module tb_l2_way_array;
  import cache_pkg::*;
  localparam int SETS = 16;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  en = 1'b0, fill = 1'b0, wr_word = 1'b0;
  addr_t addr = '0;
  logic  hit, valid;
  logic [ADDR_W-LINE_LSB-$clog2(SETS)-1:0] tag;
  line_t rdata, fill_line = '0;
  word_t wdata = '0;

  bit    r_valid [SETS];
  logic [21:0] r_tag [SETS];
  line_t r_data [SETS];
  int checks = 0, failures = 0, hits = 0;

  always #5 clk = ~clk;
  l2_way_array #(.SETS(SETS)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      int s;
      bit exp_hit;
      @(negedge clk);
      en      = $urandom_range(0, 99) < 75;
      addr    = {20'h0, 2'($urandom), 4'($urandom), 4'($urandom), 2'b00};
      fill    = $urandom_range(0, 99) < 20;
      wr_word = !fill && $urandom_range(0, 99) < 40;
      wdata   = $urandom;
      for (int w = 0; w < 16; w++) fill_line[w*32 +: 32] = $urandom;
      #1;
      s = int'(addr[9:6]);
      exp_hit = en && r_valid[s] && r_tag[s] == addr[31:10];
      chk(hit == exp_hit, $sformatf("hit=%b expected %b", hit, exp_hit));
      chk(valid == (en && r_valid[s]), "valid");
      if (exp_hit) begin
        hits++;
        chk(rdata == r_data[s], "line data");
        chk(tag == r_tag[s], "tag");
      end
      if (!en) chk(rdata == '0 && tag == '0, "disabled way drives zero");
      @(posedge clk);
      if (en && fill) begin
        r_valid[s] = 1'b1; r_tag[s] = addr[31:10]; r_data[s] = fill_line;
      end else if (en && wr_word) begin
        r_data[s][word_sel(addr)*32 +: 32] = wdata;
      end
    end
    chk(hits > 100, "enough hits");
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
