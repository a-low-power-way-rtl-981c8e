// tb_way_decoder: exhaustive check of the way decoder against the access-
// mode table: read hit -> no way, read miss / store miss -> all ways,
// store hit -> the one way named by the tag, fill -> the named way.
module tb_way_decoder;
  localparam int WAYS = 4;
  logic wr, wr_miss, rd_miss, fill;
  logic [1:0] way;
  logic [WAYS-1:0] way_en, exp_en;
  int checks = 0, failures = 0;

  way_decoder #(.WAYS(WAYS)) dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      {wr, wr_miss, rd_miss, fill, way} = 6'(v);
      #1;
      if (rd_miss)             exp_en = 4'b1111;
      else if (wr && wr_miss)  exp_en = 4'b1111;
      else if (wr || fill)     exp_en = 4'b0001 << way;
      else                     exp_en = 4'b0000;
      checks++;
      if (way_en !== exp_en) begin
        failures++;
        $display("FAIL: wr=%b wr_miss=%b rd_miss=%b fill=%b way=%0d -> %b, expected %b",
                 wr, wr_miss, rd_miss, fill, way, way_en, exp_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
