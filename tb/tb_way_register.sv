// tb_way_register: after reset the register must hold tag i for way i and
// return it for every one-hot selection; no selection gives valid = 0.
module tb_way_register;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic [1:0] way_tag;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  way_register #(.WAYS(4)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        sel = 4'b0001 << i;
        #1;
        checks++;
        if (!valid || way_tag != 2'(i)) begin
          failures++;
          $display("FAIL: sel=%b tag=%0d valid=%b, expected tag %0d", sel, way_tag, valid, i);
        end
      end
    end
    @(negedge clk);
    sel = '0;
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL: valid with no selection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
