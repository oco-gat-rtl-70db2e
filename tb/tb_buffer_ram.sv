// tb_buffer_ram: random writes and reads against a reference array; checks the one-cycle read
// latency and read-before-write on a same-address collision.
module tb_buffer_ram;
  localparam int DEPTH = 64, WIDTH = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  buffer_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = WIDTH'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      logic [WIDTH-1:0] expect_q;
      @(negedge clk);
      raddr = 6'($urandom);
      we = ($urandom % 2) == 1;
      waddr = ($urandom % 4 == 0) ? raddr : 6'($urandom);
      wdata = WIDTH'($urandom);
      expect_q = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, expect_q);
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
