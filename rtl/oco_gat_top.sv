// oco_gat_top: the OCO-GAT accelerator for Graph Attention Network inference.
//
// GAT's attention weights a_ij = exp(e_ij) / sum_k exp(e_ik) normally force every neighbour of a
// node to be visited before any weighted sum can start, and a division per node pair. This
// design computes in the reordered form
//   h' = W h,  p = a1 h',  q = a2 h',  e_ij = LeakyReLU(p_i + q_j),  e'_ij = exp(e_ij),
//   z_i = ELU( sum_j e'_ij h'_j / sum_j e'_ij )
// so node pairs stream through a pipeline back to back and there is one division per node.
//
// Structure (one instance of each below):
//   main_controller       DMA to external storage and task sequencing
//   combination_module    ROWS x COLS PE array, Weight and Node Feature Buffers: h', p, q
//   distributor           places p, q, h' and adjacency into the distributed buffers
//   agg_computing_module  N_ACM of them, one per sub-slice of target nodes, LANES lanes each
//   agg_sync_module       LANES Sync PEs (sum, divide, ELU) and the Result Bank
// Ports: configuration and start/busy/done for the host, and one external-storage port of
// COLS x 16-bit words (see main_controller for the protocol and the storage layout).
// lane_stall and sync_waiting show, per cycle, the Sync buffers holding lanes back and Sync PEs
// waiting for a slower module. Defaults: 5120 combination PEs, 64 computing PEs, 16 sync PEs as
// in the source; the 320 x 16 and 4 x 16 arrangement and all buffer depths are this design's
// choices.
module oco_gat_top
  import oco_pkg::*;
#(
  parameter int unsigned N_ACM      = 4,
  parameter int unsigned LANES      = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned ROWS       = 320,
  parameter int unsigned F_IN_MAX   = 4096,
  parameter int unsigned SRC_MAX    = 256,
  parameter int unsigned TGT_MAX    = 1024,
  parameter int unsigned ADJ_MAX    = 4096,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned WORD_W    = COLS * DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [15:0]                cfg_n_nodes,
  input  logic [15:0]                cfg_f_in,
  input  logic [7:0]                 cfg_n_heads,
  input  logic [15:0]                cfg_tgt_per_acm,
  input  logic [15:0]                cfg_src_per_lane,
  input  logic [ADDR_W-1:0]          cfg_adj_base,
  input  logic [ADDR_W-1:0]          cfg_wgt_base,
  input  logic [ADDR_W-1:0]          cfg_wgt_stride,
  input  logic [ADDR_W-1:0]          cfg_feat_base,
  input  logic [ADDR_W-1:0]          cfg_feat_stride,
  input  logic [ADDR_W-1:0]          cfg_res_base,
  input  logic [ADDR_W-1:0]          cfg_res_stride,
  input  logic [ADDR_W-1:0]          cfg_res_nstride,
  output logic                       busy,
  output logic                       done,
  output logic                       rd_req,
  output logic [ADDR_W-1:0]          rd_addr,
  input  logic                       rd_ready,
  input  logic                       rd_valid,
  input  logic [WORD_W-1:0]          rd_data,
  output logic                       wr_req,
  output logic [ADDR_W-1:0]          wr_addr,
  output logic [WORD_W-1:0]          wr_data,
  input  logic                       wr_ready,
  output logic [N_ACM-1:0][LANES-1:0] lane_stall,
  output logic [LANES-1:0]           sync_waiting
);

  localparam int unsigned NCH = (F_IN_MAX + ROWS - 1) / ROWS;
  localparam int unsigned CAW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned FBANKS = ROWS / COLS;
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned FBW = (FBANKS > 1) ? $clog2(FBANKS) : 1;
  localparam int unsigned SAW = $clog2(SRC_MAX);
  localparam int unsigned TAW = $clog2(TGT_MAX);
  localparam int unsigned EAW = $clog2(ADJ_MAX);
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1;

  // controller <-> combination
  logic wgt_we, feat_we, kern_we, kern_sel, comb_start, comb_busy;
  logic [RW-1:0] wgt_bank;
  logic [CAW-1:0] wgt_addr, feat_addr;
  logic [FBW-1:0] feat_bank;
  data_t [COLS-1:0] buf_wdata;
  logic [15:0] comb_node;
  logic [CAW:0] comb_chunks;
  // combination -> distributor
  logic c_valid;
  logic [15:0] c_node;
  data_t [COLS-1:0] c_h;
  data_t c_p, c_q;
  // controller <-> distributor
  logic dist_clear, adj_clear, adj_valid;
  logic [15:0] adj_lane;
  adj_entry_t adj_data;
  logic [31:0] dist_nodes_in;
  // distributor -> modules
  logic [N_ACM-1:0] p_we, t_we, a_we;
  logic [LW-1:0] p_lane, a_lane;
  logic [SAW-1:0] p_addr;
  data_t p_data, t_q;
  logic [TAW-1:0] t_addr;
  data_t [COLS-1:0] t_h;
  logic [EAW-1:0] a_addr;
  adj_entry_t a_data;
  logic [N_ACM-1:0][LANES-1:0][EAW:0] n_entries;
  // aggregation
  logic agg_start, sync_clear;
  logic [N_ACM-1:0] acm_busy;
  logic [N_ACM-1:0][LANES-1:0] s_valid;
  logic [N_ACM-1:0][LANES-1:0][SAW-1:0] s_src;
  acc_t [N_ACM-1:0][LANES-1:0] s_coeff;
  acc_t [N_ACM-1:0][LANES-1:0][COLS-1:0] s_prod;
  logic [31:0] sync_results;
  logic [LW-1:0] rb_lane;
  logic [SAW-1:0] rb_addr;
  data_t [COLS-1:0] rb_data;

  main_controller #(.N_ACM(N_ACM), .LANES(LANES), .COLS(COLS), .ROWS(ROWS),
                    .F_IN_MAX(F_IN_MAX), .SRC_MAX(SRC_MAX), .TGT_MAX(TGT_MAX),
                    .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .start, .cfg_n_nodes, .cfg_f_in, .cfg_n_heads, .cfg_tgt_per_acm,
    .cfg_src_per_lane, .cfg_adj_base, .cfg_wgt_base, .cfg_wgt_stride, .cfg_feat_base,
    .cfg_feat_stride, .cfg_res_base, .cfg_res_stride, .cfg_res_nstride, .busy, .done,
    .rd_req, .rd_addr, .rd_ready, .rd_valid, .rd_data, .wr_req, .wr_addr, .wr_data, .wr_ready,
    .wgt_we, .wgt_bank, .wgt_addr, .feat_we, .feat_bank, .feat_addr, .kern_we, .kern_sel,
    .buf_wdata, .comb_start, .comb_node, .comb_chunks, .comb_busy,
    .dist_clear, .adj_clear, .adj_valid, .adj_lane, .adj_data, .dist_nodes_in,
    .agg_start, .agg_busy(|acm_busy), .sync_clear, .sync_results, .rb_lane, .rb_addr, .rb_data);

  combination_module #(.ROWS(ROWS), .COLS(COLS), .F_IN_MAX(F_IN_MAX), .NODE_W(16)) u_comb (
    .clk, .rst_n, .wgt_we, .wgt_bank, .wgt_addr, .wgt_data(buf_wdata),
    .feat_we, .feat_bank, .feat_addr, .feat_data(buf_wdata),
    .kern_we, .kern_sel, .kern_data(buf_wdata),
    .start(comb_start), .node_id(comb_node), .n_feat(cfg_f_in), .n_chunks(comb_chunks),
    .busy(comb_busy), .out_valid(c_valid), .out_node(c_node), .out_h(c_h), .out_p(c_p),
    .out_q(c_q));

  distributor #(.N_ACM(N_ACM), .LANES(LANES), .COLS(COLS), .SRC_MAX(SRC_MAX),
                .TGT_MAX(TGT_MAX), .ADJ_MAX(ADJ_MAX)) u_dist (
    .clk, .rst_n, .clear(dist_clear), .tgt_per_acm((TAW+1)'(cfg_tgt_per_acm)),
    .src_per_lane((SAW+1)'(cfg_src_per_lane)),
    .in_valid(c_valid), .in_h(c_h), .in_p(c_p), .in_q(c_q), .n_nodes_in(dist_nodes_in),
    .adj_clear, .adj_valid, .adj_lane, .adj_data,
    .p_we, .p_lane, .p_addr, .p_data, .t_we, .t_addr, .t_q, .t_h,
    .a_we, .a_lane, .a_addr, .a_data, .n_entries);

  for (genvar m = 0; m < N_ACM; m++) begin : g_acm
    agg_computing_module #(.LANES(LANES), .COLS(COLS), .SRC_MAX(SRC_MAX), .TGT_MAX(TGT_MAX),
                           .ADJ_MAX(ADJ_MAX)) u_acm (
      .clk, .rst_n,
      .p_we(p_we[m]), .p_lane, .p_addr, .p_data,
      .t_we(t_we[m]), .t_addr, .t_q, .t_h,
      .a_we(a_we[m]), .a_lane, .a_addr, .a_data,
      .start(agg_start), .n_entries(n_entries[m]), .stall(lane_stall[m]), .busy(acm_busy[m]),
      .out_valid(s_valid[m]), .out_src(s_src[m]), .out_coeff(s_coeff[m]), .out_prod(s_prod[m]));
  end

  agg_sync_module #(.N_ACM(N_ACM), .LANES(LANES), .COLS(COLS), .SRC_MAX(SRC_MAX),
                    .FIFO_DEPTH(FIFO_DEPTH)) u_sync (
    .clk, .rst_n, .clear(sync_clear), .in_valid(s_valid), .in_src(s_src), .in_coeff(s_coeff),
    .in_prod(s_prod), .stall(lane_stall), .rb_lane, .rb_addr, .rb_data,
    .n_results(sync_results), .sync_waiting);

endmodule
