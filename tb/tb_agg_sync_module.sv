// tb_agg_sync_module: 2 modules x 2 lanes feed the Sync array with partial sums of 12 source
// nodes per lane, lane by lane at different paces. The stall outputs must map to the right
// module and lane, n_results must count 24 embeddings, and every Result Bank word read back
// must equal ELU(sum of products / sum of coefficients) of a floating-point model within 2/256.
module tb_agg_sync_module;
  import oco_pkg::*;
  localparam int N = 2, L = 2, COLS = 2, NS = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear;
  logic [N-1:0][L-1:0] in_valid, stall;
  logic [N-1:0][L-1:0][3:0] in_src;
  acc_t [N-1:0][L-1:0] in_coeff;
  acc_t [N-1:0][L-1:0][COLS-1:0] in_prod;
  logic [0:0] rb_lane;
  logic [3:0] rb_addr;
  data_t [COLS-1:0] rb_data;
  logic [31:0] n_results;
  logic [L-1:0] sync_waiting;
  int checks = 0, failures = 0, stall_seen = 0;
  longint cs [N][L][NS];
  longint ps [N][L][NS][COLS];

  agg_sync_module #(.N_ACM(N), .LANES(L), .COLS(COLS), .SRC_MAX(16), .FIFO_DEPTH(16), .AFULL_MARGIN(6)) dut (.*);

  always @(posedge clk) if (stall[1][0]) stall_seen++;

  initial begin
    for (int m = 0; m < N; m++) for (int g = 0; g < L; g++) for (int i = 0; i < NS; i++) begin
      cs[m][g][i] = longint'($urandom % 50000) + 50;
      for (int c = 0; c < COLS; c++) ps[m][g][i][c] = (longint'($urandom % 100000) - 50000) * 3;
    end
    rst_n = 0; clear = 0; in_valid = '0; in_src = '0; in_coeff = '0; in_prod = '0;
    rb_lane = 0; rb_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    // module 1, lane 0 pushes all of its entries first: its buffer fills past the mark
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      in_valid = '0;
      in_valid[1][0] = 1; in_src[1][0] = 4'(i); in_coeff[1][0] = acc_t'(cs[1][0][i]);
      for (int c = 0; c < COLS; c++) in_prod[1][0][c] = acc_t'(ps[1][0][i][c]);
    end
    @(negedge clk);
    in_valid = '0;
    // then the others, all together
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      in_valid = '0;
      for (int m = 0; m < N; m++) for (int g = 0; g < L; g++) if (!(m == 1 && g == 0)) begin
        in_valid[m][g] = 1; in_src[m][g] = 4'(i); in_coeff[m][g] = acc_t'(cs[m][g][i]);
        for (int c = 0; c < COLS; c++) in_prod[m][g][c] = acc_t'(ps[m][g][i][c]);
      end
    end
    @(negedge clk);
    in_valid = '0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_results != 32'(L * NS)) begin failures++; $display("n_results %0d", n_results); end
    for (int g = 0; g < L; g++) for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      rb_lane = 1'(g); rb_addr = 4'(i);
      @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        real z, got;
        z = real'(ps[0][g][i][c] + ps[1][g][i][c]) / real'(cs[0][g][i] + cs[1][g][i]);
        if (z > 127.99) z = 127.99;
        if (z < -128.0) z = -128.0;
        if (z < 0.0) z = $exp(z) - 1.0;
        got = real'(rb_data[c]) / 256.0;
        checks++;
        if (got - z > 2.0 / 256.0 || z - got > 2.0 / 256.0) begin
          failures++; $display("lane %0d src %0d z[%0d] %f exp %f", g, i, c, got, z);
        end
      end
    end
    checks++;
    if (stall_seen == 0) begin failures++; $display("stall[1][0] never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
