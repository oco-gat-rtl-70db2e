// indexing_controller: the Indexing Controller of one lane of an Aggregation Computing Module.
//
// It turns the lane's adjacency list into a stream of node-pair tasks for the Computing PE.
// The adjacency buffer of a lane holds, for each source node of the lane's group in turn, the
// sub-slice-local ids of its neighbours (target nodes j), the last one flagged; a source with no
// neighbour in this sub-slice has a single entry flagged empty. The controller walks the entries
// in order and counts source nodes, so the k-th source of the group is source id k.
//
// Pipeline (two stages, as the Indexing row of the node-pair pipeline):
//   stage 1  the entry address goes to the adjacency buffer;
//   stage 2  the entry's j addresses the right-attention and combination-result buffers and the
//            source id k addresses the left-attention buffer;
// one cycle later the task (k, j's q_j and h'_j, p_k, last, empty) is on the outputs with
// task_valid. One task is issued per cycle unless stall is high (the Sync PE input buffer of this
// lane is nearly full); stall only holds back new issues, tasks in flight complete. start loads
// n_entries and restarts the walk; busy is high until the last task has left. The entry format,
// the start/stall/busy handshake and the synchronous buffer reads are this design's choices.
module indexing_controller
  import oco_pkg::*;
#(
  parameter int unsigned COLS    = 16,
  parameter int unsigned SRC_MAX = 256,
  parameter int unsigned TGT_MAX = 1024,
  parameter int unsigned ADJ_MAX = 4096,
  localparam int unsigned SAW = $clog2(SRC_MAX),
  localparam int unsigned TAW = $clog2(TGT_MAX),
  localparam int unsigned EAW = $clog2(ADJ_MAX)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [EAW:0]       n_entries,
  input  logic               stall,
  output logic               busy,
  // buffer read ports (data one cycle after the address)
  output logic [EAW-1:0]     adj_raddr,
  input  adj_entry_t         adj_rdata,
  output logic [SAW-1:0]     left_raddr,
  input  data_t              left_rdata,
  output logic [TAW-1:0]     tgt_raddr,
  input  data_t              right_rdata,
  input  data_t [COLS-1:0]   com_rdata,
  // node-pair task
  output logic               task_valid,
  output logic [SAW-1:0]     task_src,
  output logic               task_last,
  output logic               task_empty,
  output data_t              task_p,
  output data_t              task_q,
  output data_t [COLS-1:0]   task_h
);

  logic [EAW:0]   e_cnt, e_total;
  logic [SAW-1:0] src_cnt;
  logic           s1_valid;
  logic           s2_valid, s2_last, s2_empty;
  logic [SAW-1:0] s2_src;
  logic           issue;

  assign issue      = (e_cnt != e_total) && !stall;
  assign busy       = (e_cnt != e_total) || s1_valid || s2_valid;
  assign adj_raddr  = e_cnt[EAW-1:0];
  assign left_raddr = src_cnt;
  assign tgt_raddr  = adj_rdata.tgt[TAW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_cnt <= '0;
      e_total <= '0;
      src_cnt <= '0;
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s2_last <= 1'b0;
      s2_empty <= 1'b0;
      s2_src <= '0;
    end else begin
      if (start && !busy) begin
        e_cnt <= '0;
        e_total <= n_entries;
        src_cnt <= '0;
      end else if (issue) begin
        e_cnt <= e_cnt + 1'b1;
      end
      s1_valid <= issue;
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_src <= src_cnt;
        s2_last <= adj_rdata.last;
        s2_empty <= adj_rdata.empty;
        if (adj_rdata.last) src_cnt <= src_cnt + 1'b1;
      end
    end
  end

  assign task_valid = s2_valid;
  assign task_src   = s2_src;
  assign task_last  = s2_last;
  assign task_empty = s2_empty;
  assign task_p     = left_rdata;
  assign task_q     = right_rdata;
  assign task_h     = com_rdata;

endmodule
