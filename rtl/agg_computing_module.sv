// agg_computing_module: one Aggregation Computing Module. It holds the graph data of one
// sub-slice (a range of target nodes) and computes, for every source node of the slice, the
// partial sums  sum_j e'_ij  and  sum_j e'_ij * h'_j  over the neighbours j in its sub-slice.
//
// The module has LANES lanes; lane g serves source-node group g. Each lane has its own
// indexing_controller, computing_pe and four buffers (the distributed fine-grained storage):
//   left-attention buffer   p_i of the lane's source nodes,         SRC_MAX words
//   right-attention buffer  q_j of the sub-slice's target nodes,    TGT_MAX words
//   combination-result buf  h'_j of the sub-slice's target nodes,   TGT_MAX words of COLS values
//   adjacency buffer        the lane's neighbour lists,             ADJ_MAX entries
// The target-node buffers of all lanes receive the same writes, so every lane reads its own copy
// without conflicts. Writes come from the Distributor: p writes select one lane, target writes
// go to all lanes, adjacency writes select one lane. start runs all lanes; each lane walks
// n_entries[g] entries. Lane g's partial sums leave on out_*[g] one per source node, in the
// order of the group; stall[g] from the Sync module holds back lane g's issuing.
// The lane structure and buffer kinds follow the source; one private copy of the target
// buffers per lane, and the buffer depths, are this design's choices.
module agg_computing_module
  import oco_pkg::*;
#(
  parameter int unsigned LANES   = 16,
  parameter int unsigned COLS    = 16,
  parameter int unsigned SRC_MAX = 256,
  parameter int unsigned TGT_MAX = 1024,
  parameter int unsigned ADJ_MAX = 4096,
  localparam int unsigned SAW = $clog2(SRC_MAX),
  localparam int unsigned TAW = $clog2(TGT_MAX),
  localparam int unsigned EAW = $clog2(ADJ_MAX),
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // left-attention writes (one lane)
  input  logic                     p_we,
  input  logic [LW-1:0]            p_lane,
  input  logic [SAW-1:0]           p_addr,
  input  data_t                    p_data,
  // target writes (all lanes)
  input  logic                     t_we,
  input  logic [TAW-1:0]           t_addr,
  input  data_t                    t_q,
  input  data_t [COLS-1:0]         t_h,
  // adjacency writes (one lane)
  input  logic                     a_we,
  input  logic [LW-1:0]            a_lane,
  input  logic [EAW-1:0]           a_addr,
  input  adj_entry_t               a_data,
  // control
  input  logic                     start,
  input  logic [LANES-1:0][EAW:0]  n_entries,
  input  logic [LANES-1:0]         stall,
  output logic                     busy,
  // partial sums to the Aggregation Sync Module
  output logic [LANES-1:0]         out_valid,
  output logic [LANES-1:0][SAW-1:0] out_src,
  output acc_t [LANES-1:0]         out_coeff,
  output acc_t [LANES-1:0][COLS-1:0] out_prod
);

  logic [LANES-1:0] lane_busy;
  assign busy = |lane_busy;

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    logic [EAW-1:0]   adj_raddr;
    adj_entry_t       adj_rdata;
    logic [SAW-1:0]   left_raddr;
    data_t            left_rdata;
    logic [TAW-1:0]   tgt_raddr;
    data_t            right_rdata;
    data_t [COLS-1:0] com_rdata;
    logic             tv, tl, te;
    logic [SAW-1:0]   ts;
    data_t            tp, tq;
    data_t [COLS-1:0] th;

    buffer_ram #(.DEPTH(SRC_MAX), .WIDTH(DATA_W)) u_left (
      .clk, .we(p_we && (p_lane == LW'(g))), .waddr(p_addr), .wdata(p_data),
      .raddr(left_raddr), .rdata(left_rdata));
    buffer_ram #(.DEPTH(TGT_MAX), .WIDTH(DATA_W)) u_right (
      .clk, .we(t_we), .waddr(t_addr), .wdata(t_q),
      .raddr(tgt_raddr), .rdata(right_rdata));
    buffer_ram #(.DEPTH(TGT_MAX), .WIDTH(COLS * DATA_W)) u_com (
      .clk, .we(t_we), .waddr(t_addr), .wdata(t_h),
      .raddr(tgt_raddr), .rdata(com_rdata));
    buffer_ram #(.DEPTH(ADJ_MAX), .WIDTH($bits(adj_entry_t))) u_adj (
      .clk, .we(a_we && (a_lane == LW'(g))), .waddr(a_addr), .wdata(a_data),
      .raddr(adj_raddr), .rdata(adj_rdata));

    indexing_controller #(.COLS(COLS), .SRC_MAX(SRC_MAX), .TGT_MAX(TGT_MAX), .ADJ_MAX(ADJ_MAX)) u_idx (
      .clk, .rst_n, .start, .n_entries(n_entries[g]), .stall(stall[g]), .busy(lane_busy[g]),
      .adj_raddr, .adj_rdata, .left_raddr, .left_rdata, .tgt_raddr, .right_rdata, .com_rdata,
      .task_valid(tv), .task_src(ts), .task_last(tl), .task_empty(te),
      .task_p(tp), .task_q(tq), .task_h(th));

    computing_pe #(.COLS(COLS), .SRC_W(SAW)) u_pe (
      .clk, .rst_n, .in_valid(tv), .in_src(ts), .in_last(tl), .in_empty(te),
      .in_p(tp), .in_q(tq), .in_h(th),
      .out_valid(out_valid[g]), .out_src(out_src[g]), .out_coeff(out_coeff[g]),
      .out_prod(out_prod[g]));
  end

endmodule
