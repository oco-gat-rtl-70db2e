// tb_comb_pe: random operand pairs, including the extremes; the product must appear one cycle
// after the operands.
module tb_comb_pe;
  import oco_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  data_t x, w;
  logic signed [31:0] prod;
  int checks = 0, failures = 0;

  comb_pe dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      int xi, wi;
      @(negedge clk);
      xi = (n == 0) ? -32768 : (n == 1) ? 32767 : int'($urandom % 65536) - 32768;
      wi = (n == 0) ? -32768 : (n == 1) ? -32768 : int'($urandom % 65536) - 32768;
      x = 16'(xi); w = 16'(wi);
      @(posedge clk); #1;
      checks++;
      if (prod !== 32'(longint'(xi) * longint'(wi))) begin
        failures++;
        $display("%0d * %0d: got %0d", xi, wi, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
