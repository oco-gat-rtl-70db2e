// tb_sync_pe: two Aggregation Computing Modules feed one Sync PE with partial sums of 40 source
// nodes; module 0 runs ahead while module 1 delivers with long gaps, so the Sync PE waits and
// module 0 sees afull (and obeys it). Each embedding must equal ELU(total products / total
// coefficients) of a floating-point model within 2/256, in source order, and appear 4 cycles
// after the later of its two partial sums was pushed. One source has no neighbour (z = 0).
module tb_sync_pe;
  import oco_pkg::*;
  localparam int N = 2, COLS = 4, NSRC = 40, DEPTH = 16, MARGIN = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [N-1:0] in_valid, afull;
  logic [N-1:0][7:0] in_src;
  acc_t [N-1:0] in_coeff;
  acc_t [N-1:0][COLS-1:0] in_prod;
  logic res_valid, waiting;
  logic [7:0] res_src;
  data_t [COLS-1:0] res_z;
  int checks = 0, failures = 0, cyc = 0, got = 0, afull_seen = 0, wait_seen = 0;
  longint cs [N][NSRC];
  longint ps [N][NSRC][COLS];
  int push_cyc [N][NSRC];

  sync_pe #(.N_ACM(N), .COLS(COLS), .SRC_W(8), .FIFO_DEPTH(DEPTH), .AFULL_MARGIN(MARGIN)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (|afull) afull_seen++;
    if (waiting) wait_seen++;
  end

  task automatic feeder(int m);
    for (int i = 0; i < NSRC; i++) begin
      @(negedge clk);
      while (afull[m] || (m == 1 && ($urandom % 3 != 0))) begin
        in_valid[m] = 0;
        @(negedge clk);
      end
      in_valid[m] = 1; in_src[m] = 8'(i); in_coeff[m] = acc_t'(cs[m][i]);
      for (int c = 0; c < COLS; c++) in_prod[m][c] = acc_t'(ps[m][i][c]);
      push_cyc[m][i] = cyc;
    end
    @(negedge clk);
    in_valid[m] = 0;
  endtask

  initial begin
    for (int m = 0; m < N; m++)
      for (int i = 0; i < NSRC; i++) begin
        cs[m][i] = (i == 9) ? 0 : longint'($urandom % 40000) + 100;
        for (int c = 0; c < COLS; c++)
          ps[m][i][c] = (i == 9) ? 0 : (longint'($urandom % 200000) - 100000) * (cs[m][i] / 100 + 1) / 50;
      end
    rst_n = 0; in_valid = '0; in_src = '0; in_coeff = '0; in_prod = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      feeder(0);
      feeder(1);
    join
    repeat (10) @(negedge clk);
    checks++; if (got != NSRC) begin failures++; $display("%0d results", got); end
    checks++; if (afull_seen == 0) begin failures++; $display("afull never seen"); end
    checks++; if (wait_seen == 0) begin failures++; $display("waiting never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && res_valid) begin
    real csum, z, g;
    int lat;
    checks++;
    if (int'(res_src) != got) begin failures++; $display("source %0d expected %0d", res_src, got); end
    csum = real'(cs[0][got] + cs[1][got]);
    lat = cyc - ((push_cyc[0][got] > push_cyc[1][got]) ? push_cyc[0][got] : push_cyc[1][got]);
    checks++;
    if (lat != 4) begin failures++; $display("source %0d latency %0d", got, lat); end
    for (int c = 0; c < COLS; c++) begin
      z = (csum == 0.0) ? 0.0 : real'(ps[0][got][c] + ps[1][got][c]) / csum;
      if (z > 127.99) z = 127.99;
      if (z < -128.0) z = -128.0;
      if (z < 0.0) z = $exp(z) - 1.0;
      g = real'(res_z[c]) / 256.0;
      checks++;
      if (g - z > 2.0 / 256.0 || z - g > 2.0 / 256.0) begin
        failures++; $display("source %0d z[%0d] %f expected %f", got, c, g, z);
      end
    end
    got++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
