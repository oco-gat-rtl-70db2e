// tb_combination_module: an 8 x 4 array with up to 32 input features. Random W^T, a1, a2 and
// node features are written into the buffers; nodes with 5, 8, 13 and 32 features (one to four
// chunks) are computed. h', p and q must equal an exact integer model, and out_valid must come
// n_chunks + 5 cycles after the start edge.
module tb_combination_module;
  import oco_pkg::*;
  localparam int ROWS = 8, COLS = 4, FMAX = 32, NCH = 4, FB = ROWS / COLS;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic wgt_we, feat_we, kern_we, kern_sel, start, busy, out_valid;
  logic [2:0] wgt_bank;
  logic [1:0] wgt_addr, feat_addr;
  logic [0:0] feat_bank;
  data_t [COLS-1:0] wgt_data, feat_data, kern_data, out_h;
  logic [15:0] node_id, n_feat, out_node;
  logic [2:0] n_chunks;
  data_t out_p, out_q;
  int checks = 0, failures = 0;
  int W [FMAX][COLS];
  int A1 [COLS], A2 [COLS];
  int X [FMAX];

  combination_module #(.ROWS(ROWS), .COLS(COLS), .F_IN_MAX(FMAX)) dut (.*);

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic run_node(int id, int nf);
    int hr [COLS];
    longint pd, qd;
    int t0, lat;
    // features
    for (int k = 0; k < FMAX; k++) X[k] = int'($urandom % 1024) - 512;
    for (int w = 0; w < FMAX / COLS; w++) begin
      @(negedge clk);
      feat_we = 1; feat_bank = 1'(w % FB); feat_addr = 2'(w / FB);
      for (int c = 0; c < COLS; c++) feat_data[c] = 16'(X[w * COLS + c]);
    end
    @(negedge clk);
    feat_we = 0;
    start = 1; node_id = 16'(id); n_feat = 16'(nf); n_chunks = 3'((nf + ROWS - 1) / ROWS);
    @(negedge clk);
    start = 0;
    t0 = $time;
    // reference
    pd = 0; qd = 0;
    for (int c = 0; c < COLS; c++) begin
      longint acc = 0;
      for (int k = 0; k < nf; k++) acc += longint'(X[k]) * W[k][c];
      hr[c] = sat16(acc >>> 8);
      pd += longint'(A1[c]) * hr[c];
      qd += longint'(A2[c]) * hr[c];
    end
    while (!out_valid) @(negedge clk);
    lat = (int'($time) - t0) / 10 + 1;
    checks++;
    if (lat != (nf + ROWS - 1) / ROWS + 5) begin
      failures++; $display("node %0d latency %0d", id, lat);
    end
    checks++;
    if (out_node != 16'(id)) begin failures++; $display("node id %0d", out_node); end
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (out_h[c] != 16'(hr[c])) begin
        failures++; $display("node %0d h[%0d] got %0d expected %0d", id, c, out_h[c], hr[c]);
      end
    end
    checks += 2;
    if (out_p != 16'(sat16(pd >>> 8))) begin failures++; $display("p got %0d", out_p); end
    if (out_q != 16'(sat16(qd >>> 8))) begin failures++; $display("q got %0d", out_q); end
  endtask

  initial begin
    rst_n = 0; wgt_we = 0; feat_we = 0; kern_we = 0; kern_sel = 0; start = 0;
    wgt_bank = 0; wgt_addr = 0; feat_bank = 0; feat_addr = 0; node_id = 0; n_feat = 0;
    n_chunks = 0; wgt_data = '0; feat_data = '0; kern_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < FMAX; k++) begin
      @(negedge clk);
      wgt_we = 1; wgt_bank = 3'(k % ROWS); wgt_addr = 2'(k / ROWS);
      for (int c = 0; c < COLS; c++) begin
        W[k][c] = int'($urandom % 512) - 256;
        wgt_data[c] = 16'(W[k][c]);
      end
    end
    @(negedge clk);
    wgt_we = 0;
    for (int s = 0; s < 2; s++) begin
      @(negedge clk);
      kern_we = 1; kern_sel = s[0];
      for (int c = 0; c < COLS; c++) begin
        if (s == 0) begin A1[c] = int'($urandom % 512) - 256; kern_data[c] = 16'(A1[c]); end
        else        begin A2[c] = int'($urandom % 512) - 256; kern_data[c] = 16'(A2[c]); end
      end
    end
    @(negedge clk);
    kern_we = 0;
    run_node(3, 5);
    run_node(7, 8);
    run_node(11, 13);
    run_node(12, 32);
    run_node(13, 32);
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
