// tb_main_controller: the Main Controller runs 2 heads over 20 nodes with 20 input features
// against the storage model (random read stalls) and simple stand-ins for the datapath. It must
// forward the adjacency entries in order, write every W^T row, both kernels and every feature
// word to the right buffer bank and address, start each node once, start aggregation once per
// head, and write each Result Bank word node-major to res_base + node * n_heads + head.
module tb_main_controller;
  import oco_pkg::*;
  localparam int N_ACM = 2, L = 4, COLS = 4, ROWS = 8, FMAX = 32, NN = 20, F = 20, H = 2;
  localparam int NW = (F + COLS - 1) / COLS, NT = 7, SPL = 5;
  localparam int ADJB = 0, WB = 16, WS = F + 2, FEB = 64, RB = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic rd_req, rd_ready, rd_valid, wr_req, wr_ready;
  logic [31:0] rd_addr, wr_addr;
  logic [COLS*16-1:0] rd_data, wr_data;
  logic wgt_we, feat_we, kern_we, kern_sel, comb_start, comb_busy;
  logic [2:0] wgt_bank;
  logic [1:0] wgt_addr, feat_addr;
  logic [0:0] feat_bank;
  data_t [COLS-1:0] buf_wdata, rb_data;
  logic [15:0] comb_node, adj_lane;
  logic [2:0] comb_chunks;
  logic dist_clear, adj_clear, adj_valid, agg_start, sync_clear;
  adj_entry_t adj_data;
  logic [31:0] dist_nodes_in, sync_results;
  logic [1:0] rb_lane;
  logic [3:0] rb_addr;
  int checks = 0, failures = 0;
  int head = 0, wk = 0, kk = 0, fw = 0, node_starts = 0, agg_starts = 0, adj_n = 0, busy_cnt = 0;
  int done_n = 0;

  main_controller #(.N_ACM(N_ACM), .LANES(L), .COLS(COLS), .ROWS(ROWS), .F_IN_MAX(FMAX),
                    .SRC_MAX(16), .TGT_MAX(16)) dut (
    .clk, .rst_n, .start, .cfg_n_nodes(16'(NN)), .cfg_f_in(16'(F)), .cfg_n_heads(8'(H)),
    .cfg_tgt_per_acm(16'd10), .cfg_src_per_lane(16'(SPL)), .cfg_adj_base(32'(ADJB)),
    .cfg_wgt_base(32'(WB)), .cfg_wgt_stride(32'(WS)), .cfg_feat_base(32'(FEB)),
    .cfg_feat_stride(32'(NW)), .cfg_res_base(32'(RB)), .cfg_res_stride(32'd1), .cfg_res_nstride(32'(H)), .busy, .done,
    .rd_req, .rd_addr, .rd_ready, .rd_valid, .rd_data, .wr_req, .wr_addr, .wr_data, .wr_ready,
    .wgt_we, .wgt_bank, .wgt_addr, .feat_we, .feat_bank, .feat_addr, .kern_we, .kern_sel,
    .buf_wdata, .comb_start, .comb_node, .comb_chunks, .comb_busy, .dist_clear, .adj_clear,
    .adj_valid, .adj_lane, .adj_data, .dist_nodes_in, .agg_start, .agg_busy(1'b0), .sync_clear,
    .sync_results, .rb_lane, .rb_addr, .rb_data);

  ext_mem_model #(.WORD_W(COLS * 16), .DEPTH(512)) u_mem (.*);

  // stand-ins: combination busy for n_chunks cycles, every node reaches the distributor,
  // the Sync module produces one result per cycle after agg_start
  always @(posedge clk) begin
    if (!rst_n) begin busy_cnt <= 0; dist_nodes_in <= 0; sync_results <= 0; end
    else begin
      if (comb_start) busy_cnt <= int'(comb_chunks);
      else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
      if (dist_clear) dist_nodes_in <= 0;
      else if (comb_start) dist_nodes_in <= dist_nodes_in + 1;
      if (sync_clear) sync_results <= 0;
      else if (agg_starts > 0 && sync_results < NN && !agg_start) sync_results <= sync_results + 1;
    end
    for (int c = 0; c < COLS; c++) rb_data[c] <= 16'(head * 1000 + int'(rb_lane) * 100 + int'(rb_addr) * 10 + c);
  end
  assign comb_busy = busy_cnt > 0;

  function automatic logic [COLS*16-1:0] wordv(int a);
    logic [COLS*16-1:0] w;
    for (int c = 0; c < COLS; c++) w[c*16 +: 16] = 16'(a * 7 + c);
    return w;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (adj_valid) begin
      checks++;
      if (adj_lane != 16'(adj_n % 8) || adj_data.tgt != 14'(adj_n)) begin
        failures++; $display("adjacency entry %0d: lane %0d tgt %0d", adj_n, adj_lane, adj_data.tgt);
      end
      adj_n++;
    end
    if (wgt_we) begin
      checks++;
      if (wgt_bank != 3'(wk % ROWS) || wgt_addr != 2'(wk / ROWS) || buf_wdata != wordv(WB + head * WS + wk)) begin
        failures++; $display("weight %0d head %0d: bank %0d addr %0d", wk, head, wgt_bank, wgt_addr);
      end
      wk++;
    end
    if (kern_we) begin
      checks++;
      if (kern_sel != 1'(kk) || buf_wdata != wordv(WB + head * WS + F + kk)) begin
        failures++; $display("kernel %0d head %0d", kk, head);
      end
      kk++;
    end
    if (feat_we) begin
      int n, w;
      n = fw / NW; w = fw % NW;
      checks++;
      if (feat_bank != 1'(w % 2) || feat_addr != 2'(w / 2) || buf_wdata != wordv(FEB + n * NW + w)) begin
        failures++; $display("feature word %0d of node %0d: bank %0d addr %0d", w, n, feat_bank, feat_addr);
      end
      fw++;
    end
    if (comb_start) begin
      checks++;
      if (comb_node != 16'(node_starts % NN) || comb_chunks != 3'((F + ROWS - 1) / ROWS)) begin
        failures++; $display("node start %0d: node %0d", node_starts, comb_node);
      end
      node_starts++;
    end
    if (agg_start) begin
      agg_starts++;
      checks++;
      if (node_starts != agg_starts * NN) begin failures++; $display("aggregation started early"); end
    end
    if (done) done_n++;
  end

  // next head: reset the per-head expectations when the controller goes back to the weights
  always @(negedge clk) if (rst_n && wr_req && wr_ready && dut.node == 16'(NN - 1) && dut.head == 8'(head)) begin
    head++; wk = 0; kk = 0; fw = 0;
  end

  initial begin
    for (int a = 0; a < 512; a++) u_mem.mem[a] = wordv(a);
    u_mem.mem[ADJB] = '0;
    u_mem.mem[ADJB][31:0] = NT;
    for (int e = 0; e < NT; e++) begin
      u_mem.mem[ADJB + 1 + e] = '0;
      u_mem.mem[ADJB + 1 + e][31:0] = {16'(e % 8), 1'b0, 1'b1, 14'(e)};
    end
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (adj_n != NT) begin failures++; $display("%0d adjacency entries", adj_n); end
    checks++; if (node_starts != H * NN) begin failures++; $display("%0d node starts", node_starts); end
    checks++; if (agg_starts != H) begin failures++; $display("%0d aggregation starts", agg_starts); end
    checks++; if (done_n != 1 || busy) begin failures++; $display("done/busy wrong"); end
    for (int h = 0; h < H; h++)
      for (int n = 0; n < NN; n++) begin
        logic [COLS*16-1:0] w;
        w = u_mem.mem[RB + n * H + h];
        checks++;
        if (w[15:0] != 16'(h * 1000 + (n / SPL) * 100 + (n % SPL) * 10)) begin
          failures++; $display("result head %0d node %0d: %0d", h, n, w[15:0]);
        end
      end
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
