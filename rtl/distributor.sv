// distributor: routes the Combination Module's results and the adjacency lists into the
// distributed buffers of the Aggregation Computing Modules (graph partition of the slice).
//
// Node n of the slice is, as a target node, part of sub-slice s = n div tgt_per_acm and is stored
// at address n mod tgt_per_acm of every lane's right-attention and combination-result buffer in
// module s. As a source node it belongs to group g = n div src_per_lane and its p_n is stored at
// address n mod src_per_lane of lane g's left-attention buffer in every module. Nodes are taken
// in the order they arrive, starting from 0 after clear, so these divisions are kept as running
// counters. Adjacency entries arrive tagged with a lane number L = s * LANES + g and are appended
// to that lane's adjacency buffer; n_entries[s][g] counts them (cleared by adj_clear).
// Everything is registered: writes appear one cycle after the input. The partition by target
// node ids into sub-slices and source groups per PE follows the source; contiguous ranges and
// the tagged adjacency stream are this design's choices.
module distributor
  import oco_pkg::*;
#(
  parameter int unsigned N_ACM   = 4,
  parameter int unsigned LANES   = 16,
  parameter int unsigned COLS    = 16,
  parameter int unsigned SRC_MAX = 256,
  parameter int unsigned TGT_MAX = 1024,
  parameter int unsigned ADJ_MAX = 4096,
  localparam int unsigned SAW = $clog2(SRC_MAX),
  localparam int unsigned TAW = $clog2(TGT_MAX),
  localparam int unsigned EAW = $clog2(ADJ_MAX),
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned MW  = (N_ACM > 1) ? $clog2(N_ACM) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic [TAW:0]                       tgt_per_acm,
  input  logic [SAW:0]                       src_per_lane,
  // from the Combination Module
  input  logic                               in_valid,
  input  data_t [COLS-1:0]                   in_h,
  input  data_t                              in_p,
  input  data_t                              in_q,
  output logic [31:0]                        n_nodes_in,
  // adjacency stream from the Main Controller
  input  logic                               adj_clear,
  input  logic                               adj_valid,
  input  logic [15:0]                        adj_lane,
  input  adj_entry_t                         adj_data,
  // to the Aggregation Computing Modules
  output logic [N_ACM-1:0]                   p_we,
  output logic [LW-1:0]                      p_lane,
  output logic [SAW-1:0]                     p_addr,
  output data_t                              p_data,
  output logic [N_ACM-1:0]                   t_we,
  output logic [TAW-1:0]                     t_addr,
  output data_t                              t_q,
  output data_t [COLS-1:0]                   t_h,
  output logic [N_ACM-1:0]                   a_we,
  output logic [LW-1:0]                      a_lane,
  output logic [EAW-1:0]                     a_addr,
  output adj_entry_t                         a_data,
  output logic [N_ACM-1:0][LANES-1:0][EAW:0] n_entries
);

  logic [MW-1:0]  s_cnt;
  logic [TAW:0]   t_cnt;
  logic [LW-1:0]  g_cnt;
  logic [SAW:0]   k_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cnt <= '0; t_cnt <= '0; g_cnt <= '0; k_cnt <= '0;
      n_nodes_in <= '0;
      p_we <= '0; p_lane <= '0; p_addr <= '0; p_data <= '0;
      t_we <= '0; t_addr <= '0; t_q <= '0; t_h <= '0;
    end else begin
      p_we <= '0;
      t_we <= '0;
      if (clear) begin
        s_cnt <= '0; t_cnt <= '0; g_cnt <= '0; k_cnt <= '0;
        n_nodes_in <= '0;
      end else if (in_valid) begin
        n_nodes_in <= n_nodes_in + 1'b1;
        p_we <= '1;
        p_lane <= g_cnt;
        p_addr <= k_cnt[SAW-1:0];
        p_data <= in_p;
        t_we[s_cnt] <= 1'b1;
        t_addr <= t_cnt[TAW-1:0];
        t_q <= in_q;
        t_h <= in_h;
        if (t_cnt == tgt_per_acm - 1'b1) begin
          t_cnt <= '0;
          s_cnt <= s_cnt + 1'b1;
        end else t_cnt <= t_cnt + 1'b1;
        if (k_cnt == src_per_lane - 1'b1) begin
          k_cnt <= '0;
          g_cnt <= g_cnt + 1'b1;
        end else k_cnt <= k_cnt + 1'b1;
      end
    end
  end

  logic [MW-1:0] as;
  logic [LW-1:0] ag;
  assign as = MW'(adj_lane / 16'(LANES));
  assign ag = LW'(adj_lane % 16'(LANES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_we <= '0; a_lane <= '0; a_addr <= '0; a_data <= '0;
      n_entries <= '0;
    end else begin
      a_we <= '0;
      if (adj_clear) begin
        n_entries <= '0;
      end else if (adj_valid) begin
        a_we[as] <= 1'b1;
        a_lane <= ag;
        a_addr <= n_entries[as][ag][EAW-1:0];
        a_data <= adj_data;
        n_entries[as][ag] <= n_entries[as][ag] + 1'b1;
      end
    end
  end

  a_lane_range: assert property (@(posedge clk) disable iff (!rst_n)
    adj_valid |-> (32'(adj_lane) < N_ACM * LANES));

endmodule
