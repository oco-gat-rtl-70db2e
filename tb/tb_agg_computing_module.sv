// tb_agg_computing_module: one module with 2 lanes and 2-element vectors. The testbench writes
// p of 2 x 10 source nodes, q and h' of 16 target nodes and a random adjacency list per lane
// (with empty tokens), starts the module and holds lane 1 stalled for a while. Each lane must
// deliver one partial-sum pair per source node, in order, matching a floating-point model of
// sum exp(LeakyReLU(p_i + q_j)) and sum exp(..) h'_j.
module tb_agg_computing_module;
  import oco_pkg::*;
  localparam int L = 2, COLS = 2, SRC = 16, TGT = 16, ADJ = 64, NS = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, p_we, t_we, a_we, start, busy;
  logic [0:0] p_lane, a_lane;
  logic [3:0] p_addr, t_addr;
  logic [5:0] a_addr;
  data_t p_data, t_q;
  data_t [COLS-1:0] t_h;
  adj_entry_t a_data;
  logic [L-1:0][6:0] n_entries;
  logic [L-1:0] stall, out_valid;
  logic [L-1:0][3:0] out_src;
  acc_t [L-1:0] out_coeff;
  acc_t [L-1:0][COLS-1:0] out_prod;
  int checks = 0, failures = 0;
  int pm [L][NS], qm [TGT], hm [TGT][COLS];
  real rc [L][NS];
  real rp [L][NS][COLS];
  int got [L];

  agg_computing_module #(.LANES(L), .COLS(COLS), .SRC_MAX(SRC), .TGT_MAX(TGT), .ADJ_MAX(ADJ)) dut (.*);

  initial begin
    rst_n = 0; p_we = 0; t_we = 0; a_we = 0; start = 0; stall = '0; n_entries = '0;
    p_lane = 0; a_lane = 0; p_addr = 0; t_addr = 0; a_addr = 0; p_data = 0; t_q = 0; t_h = '0;
    a_data = '0; got[0] = 0; got[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < TGT; j++) begin
      @(negedge clk);
      qm[j] = int'($urandom % 1024) - 512;
      t_we = 1; t_addr = 4'(j); t_q = 16'(qm[j]);
      for (int c = 0; c < COLS; c++) begin hm[j][c] = int'($urandom % 1024) - 512; t_h[c] = 16'(hm[j][c]); end
    end
    @(negedge clk); t_we = 0;
    for (int g = 0; g < L; g++) begin
      int e;
      e = 0;
      for (int i = 0; i < NS; i++) begin
        @(negedge clk);
        pm[g][i] = int'($urandom % 1024) - 512;
        p_we = 1; p_lane = 1'(g); p_addr = 4'(i); p_data = 16'(pm[g][i]);
        rc[g][i] = 0.0;
        for (int c = 0; c < COLS; c++) rp[g][i][c] = 0.0;
      end
      @(negedge clk); p_we = 0;
      for (int i = 0; i < NS; i++) begin
        int nn, j;
        nn = (i == 4) ? 0 : int'($urandom % 4) + 1;
        for (int t = 0; t < ((nn == 0) ? 1 : nn); t++) begin
          @(negedge clk);
          j = int'($urandom % TGT);
          a_we = 1; a_lane = 1'(g); a_addr = 6'(e); e++;
          a_data = '{empty: (nn == 0), last: (t == ((nn == 0) ? 0 : nn - 1)), tgt: 14'(j)};
          if (nn != 0) begin
            int s, ev;
            real ep;
            s = pm[g][i] + qm[j];
            ev = (s < 0) ? int'((longint'(s) * 51) >>> 8) : s;
            ep = $exp(real'(ev) / 256.0);
            rc[g][i] += ep;
            for (int c = 0; c < COLS; c++) rp[g][i][c] += ep * real'(hm[j][c]) / 256.0;
          end
        end
      end
      n_entries[g] = 7'(e);
      @(negedge clk); a_we = 0;
    end
    @(negedge clk);
    start = 1; stall[1] = 1;
    @(negedge clk);
    start = 0;
    repeat (25) @(negedge clk);
    checks++;
    if (got[1] != 0) begin failures++; $display("lane 1 ran while stalled"); end
    stall[1] = 0;
    while (busy) @(negedge clk);
    repeat (15) @(negedge clk);
    for (int g = 0; g < L; g++) begin
      checks++;
      if (got[g] != NS) begin failures++; $display("lane %0d gave %0d results", g, got[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n)
    for (int g = 0; g < L; g++) if (out_valid[g]) begin
      real gc, tol;
      int i;
      i = got[g];
      checks++;
      if (int'(out_src[g]) != i) begin failures++; $display("lane %0d src %0d exp %0d", g, out_src[g], i); end
      else begin
        gc = real'(out_coeff[g]) / 4096.0;
        tol = 0.001 * rc[g][i] + 10.0 / 4096.0;
        checks++;
        if (gc - rc[g][i] > tol || rc[g][i] - gc > tol) begin
          failures++; $display("lane %0d src %0d coeff %f exp %f", g, i, gc, rc[g][i]);
        end
        for (int c = 0; c < COLS; c++) begin
          real gp;
          gp = real'(out_prod[g][c]) / 4096.0;
          tol = 0.002 * rc[g][i] * 2.0 + 10.0 / 4096.0;
          checks++;
          if (gp - rp[g][i][c] > tol || rp[g][i][c] - gp > tol) begin
            failures++; $display("lane %0d src %0d prod %f exp %f", g, i, gp, rp[g][i][c]);
          end
        end
      end
      got[g]++;
    end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
