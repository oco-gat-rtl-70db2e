// Shared body of the end-to-end testbenches of oco_gat_top. The including module defines the
// localparams T_N_ACM, T_LANES, T_COLS, T_ROWS, T_MEM, T_N, T_F, T_H, T_MAXCYC, T_DENSE and
// T_SPARSE (edge probabilities 1/T_DENSE in the skewed part, 1/T_SPARSE elsewhere), and instantiates
// the top as `dut` and the storage model as `u_mem`. The stimulus is a random graph with a
// skewed part (early sources of each group are dense in sub-slice 0) so that the lanes of one
// module run ahead of another's; one isolated node has no neighbour at all. The reference
// computes h', p, q in the same fixed-point format as the design (integer arithmetic, exact),
// and the softmax-weighted sum, division and ELU in floating point; embeddings must agree within
// TOL/256.

  localparam int TOL = 4;

  int checks = 0, failures = 0;
  int feat [][];
  int wgt  [][][];      // [head][k][c]
  int a1 [][], a2 [][]; // [head][c]
  bit adj  [][];        // adj[i][j]: j is a neighbour of source i
  int hq [][][];        // reference h' [head][n][c]
  int pr [][], qr [][];
  int n_words, tpa, spl, adj_base, wgt_base, wgt_stride, feat_base, res_base, n_entries_tot;
  int cnt_stall = 0, cnt_wait = 0, cnt_empty = 0, cnt_isolated = 0, cnt_neg_e = 0, cnt_neg_z = 0;
  int cnt_multichunk = 0, cnt_heads = 0, cnt_rd_backpressure = 0, cycles = 0, agg_cycles = 0;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int asr8(longint v);   // arithmetic shift right by 8 (floor)
    return int'(v >>> 8);
  endfunction

  task automatic put_word(int addr, int vals [], int n);
    logic [T_COLS*16-1:0] w;
    w = '0;
    for (int c = 0; c < n; c++) w[c*16 +: 16] = 16'(vals[c]);
    u_mem.mem[addr] = w;
  endtask

  task automatic build();
    int vals [];
    int addr, wsc, ent;
    vals = new[T_COLS];
    n_words = (T_F + T_COLS - 1) / T_COLS;
    tpa = (T_N + T_N_ACM - 1) / T_N_ACM;
    spl = (T_N + T_LANES - 1) / T_LANES;
    // ---- data
    feat = new[T_N];
    for (int n = 0; n < T_N; n++) begin
      feat[n] = new[T_F];
      for (int k = 0; k < T_F; k++) feat[n][k] = int'($urandom % 512) - 256;
    end
    wsc = 768;
    for (int s = 1; s * s <= T_F; s++) wsc = 768 / s;   // about 768 / sqrt(F)
    if (wsc < 2) wsc = 2;
    wgt = new[T_H]; a1 = new[T_H]; a2 = new[T_H];
    for (int h = 0; h < T_H; h++) begin
      wgt[h] = new[T_F];
      for (int k = 0; k < T_F; k++) begin
        wgt[h][k] = new[T_COLS];
        for (int c = 0; c < T_COLS; c++) wgt[h][k][c] = int'($urandom % (2 * wsc + 1)) - wsc;
      end
      a1[h] = new[T_COLS]; a2[h] = new[T_COLS];
      for (int c = 0; c < T_COLS; c++) begin
        a1[h][c] = int'($urandom % 257) - 128;
        a2[h][c] = int'($urandom % 257) - 128;
      end
    end
    adj = new[T_N];
    for (int i = 0; i < T_N; i++) begin
      int g, k;
      adj[i] = new[T_N];
      g = i / spl; k = i % spl;
      for (int j = 0; j < T_N; j++) begin
        if (i == T_N - 1) adj[i][j] = 0;                       // isolated node
        else if (j == i) adj[i][j] = 1;                        // self loop
        else if (k < spl / 2 && j < tpa) adj[i][j] = ($urandom % T_DENSE) == 0;  // dense in sub-slice 0
        else adj[i][j] = ($urandom % T_SPARSE) == 0;
      end
    end
    // ---- external storage layout
    adj_base = 0;
    addr = 1;
    n_entries_tot = 0;
    for (int s = 0; s < T_N_ACM; s++)
      for (int g = 0; g < T_LANES; g++)
        for (int i = g * spl; i < (g + 1) * spl && i < T_N; i++) begin
          int lastj, any;
          lastj = -1;
          for (int j = s * tpa; j < (s + 1) * tpa && j < T_N; j++) if (adj[i][j]) lastj = j;
          if (lastj < 0) begin
            u_mem.mem[addr] = '0;
            u_mem.mem[addr][31:0] = {16'(s * T_LANES + g), 1'b1, 1'b1, 14'd0};
            addr++; n_entries_tot++; cnt_empty++;
          end else begin
            for (int j = s * tpa; j <= lastj; j++) if (adj[i][j]) begin
              u_mem.mem[addr] = '0;
              u_mem.mem[addr][31:0] = {16'(s * T_LANES + g), 1'b0, (j == lastj), 14'(j - s * tpa)};
              addr++; n_entries_tot++;
            end
          end
        end
    u_mem.mem[adj_base] = '0;
    u_mem.mem[adj_base][31:0] = 32'(n_entries_tot);
    wgt_base = addr;
    wgt_stride = T_F + 2;
    for (int h = 0; h < T_H; h++) begin
      for (int k = 0; k < T_F; k++) begin
        for (int c = 0; c < T_COLS; c++) vals[c] = wgt[h][k][c];
        put_word(wgt_base + h * wgt_stride + k, vals, T_COLS);
      end
      for (int c = 0; c < T_COLS; c++) vals[c] = a1[h][c];
      put_word(wgt_base + h * wgt_stride + T_F, vals, T_COLS);
      for (int c = 0; c < T_COLS; c++) vals[c] = a2[h][c];
      put_word(wgt_base + h * wgt_stride + T_F + 1, vals, T_COLS);
    end
    feat_base = wgt_base + T_H * wgt_stride;
    for (int n = 0; n < T_N; n++)
      for (int w = 0; w < n_words; w++) begin
        for (int c = 0; c < T_COLS; c++) vals[c] = (w * T_COLS + c < T_F) ? feat[n][w * T_COLS + c] : 0;
        put_word(feat_base + n * n_words + w, vals, T_COLS);
      end
    res_base = feat_base + T_N * n_words;
    if (res_base + T_H * T_N > T_MEM) $fatal(1, "storage model too small");
    for (int a = res_base; a < res_base + T_H * T_N; a++) u_mem.mem[a] = '1;
    if (T_F > T_ROWS) cnt_multichunk = 1;
  endtask

  task automatic reference_and_check();
    hq = new[T_H]; pr = new[T_H]; qr = new[T_H];
    for (int h = 0; h < T_H; h++) begin
      hq[h] = new[T_N]; pr[h] = new[T_N]; qr[h] = new[T_N];
      for (int n = 0; n < T_N; n++) begin
        longint pd, qd;
        hq[h][n] = new[T_COLS];
        pd = 0; qd = 0;
        for (int c = 0; c < T_COLS; c++) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < T_F; k++) acc += longint'(feat[n][k]) * wgt[h][k][c];
          hq[h][n][c] = sat16(acc >>> 8);
          pd += longint'(a1[h][c]) * hq[h][n][c];
          qd += longint'(a2[h][c]) * hq[h][n][c];
        end
        pr[h][n] = sat16(pd >>> 8);
        qr[h][n] = sat16(qd >>> 8);
      end
    end
    for (int h = 0; h < T_H; h++)
      for (int i = 0; i < T_N; i++) begin
        real csum, psum [], z;
        logic [T_COLS*16-1:0] w;
        psum = new[T_COLS];
        csum = 0.0;
        for (int c = 0; c < T_COLS; c++) psum[c] = 0.0;
        for (int j = 0; j < T_N; j++) if (adj[i][j]) begin
          int s, e;
          real ep;
          s = sat16(longint'(pr[h][i]) + qr[h][j]);
          e = (s < 0) ? asr8(longint'(s) * 51) : s;
          if (e < 0) cnt_neg_e++;
          ep = $exp(real'(e) / 256.0);
          csum += ep;
          for (int c = 0; c < T_COLS; c++) psum[c] += ep * real'(hq[h][j][c]) / 256.0;
        end
        if (csum == 0.0) cnt_isolated++;
        w = u_mem.mem[res_base + h * T_N + i];
        for (int c = 0; c < T_COLS; c++) begin
          real got;
          z = (csum == 0.0) ? 0.0 : psum[c] / csum;
          if (z > 127.99) z = 127.99;
          if (z < -128.0) z = -128.0;
          if (z < 0.0) begin z = $exp(z) - 1.0; cnt_neg_z++; end
          got = real'($signed(w[c*16 +: 16])) / 256.0;
          checks++;
          if (got - z > TOL / 256.0 || z - got > TOL / 256.0) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH head %0d node %0d col %0d: got %f expected %f", h, i, c, got, z);
          end
        end
      end
  endtask

  task automatic run_all();
    build();
    rst_n = 0;
    start = 0;
    cfg_n_nodes = 16'(T_N); cfg_f_in = 16'(T_F); cfg_n_heads = 8'(T_H);
    cfg_tgt_per_acm = 16'(tpa); cfg_src_per_lane = 16'(spl);
    cfg_adj_base = 32'(adj_base); cfg_wgt_base = 32'(wgt_base); cfg_wgt_stride = 32'(wgt_stride);
    cfg_feat_base = 32'(feat_base); cfg_feat_stride = 32'(n_words);
    cfg_res_base = 32'(res_base); cfg_res_stride = 32'(T_N); cfg_res_nstride = 32'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
      if (|lane_stall) cnt_stall++;
      if (|sync_waiting) cnt_wait++;
      if (rd_req && !rd_ready) cnt_rd_backpressure++;
      if (dut.u_ctrl.agg_busy) agg_cycles++;
      if (dut.u_ctrl.agg_start) cnt_heads++;
    end
    $display("run: %0d cycles, %0d in aggregation; %0d adjacency entries", cycles, agg_cycles,
             n_entries_tot);
    reference_and_check();
    // every mechanism must have happened
    checks++; if (cnt_stall == 0)      begin failures++; $display("no lane stall"); end
    checks++; if (cnt_wait == 0)       begin failures++; $display("no sync wait"); end
    checks++; if (cnt_empty == 0)      begin failures++; $display("no empty token"); end
    checks++; if (cnt_isolated == 0)   begin failures++; $display("no isolated node"); end
    checks++; if (cnt_neg_e == 0)      begin failures++; $display("no negative LeakyReLU input"); end
    checks++; if (cnt_neg_z == 0)      begin failures++; $display("no negative ELU input"); end
    checks++; if (cnt_rd_backpressure == 0) begin failures++; $display("no read backpressure"); end
    checks++; if (cnt_heads != T_H)    begin failures++; $display("heads run %0d", cnt_heads); end
    if (T_F > T_ROWS) begin
      checks++; if (cnt_multichunk == 0) failures++;
    end
    $display("mechanisms: lane_stall_cycles=%0d sync_wait_cycles=%0d empty_tokens=%0d isolated=%0d neg_e=%0d neg_z=%0d rd_backpressure=%0d heads=%0d multichunk=%0d",
             cnt_stall, cnt_wait, cnt_empty, cnt_isolated, cnt_neg_e, cnt_neg_z,
             cnt_rd_backpressure, cnt_heads, cnt_multichunk);
  endtask
