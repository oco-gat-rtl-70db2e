// main_controller: the Main Controller. It moves data between the external storage and the
// on-chip buffers (the DMA role) and switches the computing tasks of one slice.
//
// Sequence after start:
//   1. adjacency: read the header word (entry count T) at adj_base and the T entries after it,
//      handing each to the Distributor (bits 15:0 the entry, bits 31:16 the lane number);
//   for each attention head h = 0 .. n_heads-1:
//   2. weights: read f_in words of W^T (one word = the COLS weights of one input feature) and
//      then a1 and a2, from wgt_base + h * wgt_stride, into the Combination Module;
//   3. combination: for each node n, read ceil(f_in / COLS) feature words from
//      feat_base + n * feat_stride into the Node Feature Buffer and start the node; the next
//      node's words are loaded as soon as the PE array has read the buffer;
//   4. aggregation: when all n_nodes results have passed the Distributor, start the Aggregation
//      Computing Modules and wait until the Sync module has written n_nodes embeddings;
//   5. write-back: read each embedding from the Result Bank and write it to
//      res_base + h * res_stride + n * res_nstride. With res_stride = 1 and
//      res_nstride = n_heads the heads of a node lie side by side, which is the feature layout
//      the next layer reads (feat_stride = n_heads words per node).
// done pulses for one cycle at the end; busy is high from start to done.
//
// External storage port: reads are requests (rd_req, rd_addr) accepted with rd_ready, and
// answered in order by rd_valid/rd_data any number of cycles later; several may be
// outstanding. Writes (wr_req, wr_addr, wr_data) complete when wr_ready is high. The word is
// COLS data values wide. The source gives the controller's role; the storage layout, this port
// and the strictly sequential order of the phases (no overlap of heads) are this design's
// choices.
module main_controller
  import oco_pkg::*;
#(
  parameter int unsigned N_ACM    = 4,
  parameter int unsigned LANES    = 16,
  parameter int unsigned COLS     = 16,
  parameter int unsigned ROWS     = 320,
  parameter int unsigned F_IN_MAX = 4096,
  parameter int unsigned SRC_MAX  = 256,
  parameter int unsigned TGT_MAX  = 1024,
  parameter int unsigned ADDR_W   = 32,
  localparam int unsigned NCH     = (F_IN_MAX + ROWS - 1) / ROWS,
  localparam int unsigned CAW     = (NCH > 1) ? $clog2(NCH) : 1,
  localparam int unsigned FBANKS  = ROWS / COLS,
  localparam int unsigned RW      = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned FBW     = (FBANKS > 1) ? $clog2(FBANKS) : 1,
  localparam int unsigned SAW     = $clog2(SRC_MAX),
  localparam int unsigned LW      = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned WORD_W  = COLS * DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration, stable from start to done
  input  logic                 start,
  input  logic [15:0]          cfg_n_nodes,
  input  logic [15:0]          cfg_f_in,
  input  logic [7:0]           cfg_n_heads,
  input  logic [15:0]          cfg_tgt_per_acm,
  input  logic [15:0]          cfg_src_per_lane,
  input  logic [ADDR_W-1:0]    cfg_adj_base,
  input  logic [ADDR_W-1:0]    cfg_wgt_base,
  input  logic [ADDR_W-1:0]    cfg_wgt_stride,
  input  logic [ADDR_W-1:0]    cfg_feat_base,
  input  logic [ADDR_W-1:0]    cfg_feat_stride,
  input  logic [ADDR_W-1:0]    cfg_res_base,
  input  logic [ADDR_W-1:0]    cfg_res_stride,
  input  logic [ADDR_W-1:0]    cfg_res_nstride,
  output logic                 busy,
  output logic                 done,
  // external storage
  output logic                 rd_req,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic                 rd_ready,
  input  logic                 rd_valid,
  input  logic [WORD_W-1:0]    rd_data,
  output logic                 wr_req,
  output logic [ADDR_W-1:0]    wr_addr,
  output logic [WORD_W-1:0]    wr_data,
  input  logic                 wr_ready,
  // Combination Module
  output logic                 wgt_we,
  output logic [RW-1:0]        wgt_bank,
  output logic [CAW-1:0]       wgt_addr,
  output logic                 feat_we,
  output logic [FBW-1:0]       feat_bank,
  output logic [CAW-1:0]       feat_addr,
  output logic                 kern_we,
  output logic                 kern_sel,
  output data_t [COLS-1:0]     buf_wdata,
  output logic                 comb_start,
  output logic [15:0]          comb_node,
  output logic [CAW:0]         comb_chunks,
  input  logic                 comb_busy,
  // Distributor
  output logic                 dist_clear,
  output logic                 adj_clear,
  output logic                 adj_valid,
  output logic [15:0]          adj_lane,
  output adj_entry_t           adj_data,
  input  logic [31:0]          dist_nodes_in,
  // Aggregation Part
  output logic                 agg_start,
  input  logic                 agg_busy,
  output logic                 sync_clear,
  input  logic [31:0]          sync_results,
  output logic [LW-1:0]        rb_lane,
  output logic [SAW-1:0]       rb_addr,
  input  data_t [COLS-1:0]     rb_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADJ_HDR, S_ADJ, S_WGT, S_KERN, S_FEAT, S_COMB, S_COMB_WAIT,
    S_DRAIN, S_AGG_START, S_AGG, S_RB_RD, S_RB_WR, S_DONE
  } state_t;

  state_t state;

  // read stream: issue rs_count reads from rs_base, count the answers
  logic [ADDR_W-1:0] rs_base;
  logic [31:0]       rs_count, rs_issued, rs_got;
  logic              rs_done;

  assign rd_req  = (state inside {S_ADJ_HDR, S_ADJ, S_WGT, S_KERN, S_FEAT}) && (rs_issued != rs_count);
  assign rd_addr = rs_base + rs_issued;
  assign rs_done = (rs_got == rs_count);

  logic [7:0]  head;
  logic [15:0] node;
  logic [15:0] n_words;       // feature words per node
  logic [15:0] wk;            // index of the answered word within the stream
  logic [RW-1:0]  wb;         // weight bank / feature bank counters
  logic [CAW-1:0] wa;
  logic [FBW-1:0] fb;
  logic [LW-1:0]  rb_g;
  logic [SAW:0]   rb_k;

  assign n_words     = (cfg_f_in + 16'(COLS) - 16'd1) / 16'(COLS);
  assign comb_chunks = (CAW+1)'((32'(cfg_f_in) + ROWS - 1) / ROWS);
  assign comb_node   = node;
  assign buf_wdata   = rd_data;
  assign rb_lane     = rb_g;
  assign rb_addr     = rb_k[SAW-1:0];
  assign busy        = (state != S_IDLE);

  always_comb begin
    wgt_we = 1'b0; feat_we = 1'b0; kern_we = 1'b0; kern_sel = 1'b0; adj_valid = 1'b0;
    wgt_bank = wb; wgt_addr = wa; feat_bank = fb; feat_addr = wa;
    adj_lane = rd_data[31:16];
    adj_data = adj_entry_t'(rd_data[15:0]);
    if (rd_valid) begin
      case (state)
        S_ADJ:  adj_valid = 1'b1;
        S_WGT:  wgt_we = 1'b1;
        S_KERN: begin kern_we = 1'b1; kern_sel = wk[0]; end
        S_FEAT: feat_we = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rs_base <= '0; rs_count <= '0; rs_issued <= '0; rs_got <= '0;
      head <= '0; node <= '0; wk <= '0; wb <= '0; wa <= '0; fb <= '0;
      rb_g <= '0; rb_k <= '0;
      done <= 1'b0; comb_start <= 1'b0; agg_start <= 1'b0;
      dist_clear <= 1'b0; adj_clear <= 1'b0; sync_clear <= 1'b0;
      wr_req <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else begin
      done <= 1'b0;
      comb_start <= 1'b0;
      agg_start <= 1'b0;
      dist_clear <= 1'b0;
      adj_clear <= 1'b0;
      sync_clear <= 1'b0;
      if (rd_req && rd_ready) rs_issued <= rs_issued + 1'b1;
      if (rd_valid) begin
        rs_got <= rs_got + 1'b1;
        wk <= wk + 1'b1;
        // buffer address counters for the word just written
        if (state == S_WGT) begin
          if (wb == RW'(ROWS - 1)) begin wb <= '0; wa <= wa + 1'b1; end
          else wb <= wb + 1'b1;
        end
        if (state == S_FEAT) begin
          if (fb == FBW'(FBANKS - 1)) begin fb <= '0; wa <= wa + 1'b1; end
          else fb <= fb + 1'b1;
        end
      end

      case (state)
        S_IDLE: if (start) begin
          adj_clear <= 1'b1;
          rs_base <= cfg_adj_base; rs_count <= 32'd1; rs_issued <= '0; rs_got <= '0;
          head <= '0;
          state <= S_ADJ_HDR;
        end
        S_ADJ_HDR: if (rd_valid) begin
          rs_base <= cfg_adj_base + 1'b1; rs_count <= rd_data[31:0]; rs_issued <= '0; rs_got <= '0;
          state <= S_ADJ;
        end
        S_ADJ: if (rs_done) begin
          rs_base <= cfg_wgt_base; rs_count <= 32'(cfg_f_in); rs_issued <= '0; rs_got <= '0;
          wb <= '0; wa <= '0;
          state <= S_WGT;
        end
        S_WGT: if (rs_done) begin
          rs_base <= rs_base + ADDR_W'(cfg_f_in); rs_count <= 32'd2; rs_issued <= '0; rs_got <= '0;
          wk <= '0;
          state <= S_KERN;
        end
        S_KERN: if (rs_done) begin
          dist_clear <= 1'b1;
          sync_clear <= 1'b1;
          node <= '0;
          rs_base <= cfg_feat_base; rs_count <= 32'(n_words); rs_issued <= '0; rs_got <= '0;
          fb <= '0; wa <= '0;
          state <= S_FEAT;
        end
        S_FEAT: if (rs_done && !comb_busy && !comb_start) begin
          comb_start <= 1'b1;
          state <= S_COMB;
        end
        S_COMB: state <= S_COMB_WAIT;          // comb_busy rises this cycle
        S_COMB_WAIT: if (!comb_busy) begin
          if (node == cfg_n_nodes - 1'b1) begin
            state <= S_DRAIN;
          end else begin
            node <= node + 1'b1;
            rs_base <= cfg_feat_base + ADDR_W'(node + 1'b1) * cfg_feat_stride;
            rs_count <= 32'(n_words); rs_issued <= '0; rs_got <= '0;
            fb <= '0; wa <= '0;
            state <= S_FEAT;
          end
        end
        S_DRAIN: if (dist_nodes_in == 32'(cfg_n_nodes)) state <= S_AGG_START;
        S_AGG_START: if (!agg_busy) begin
          agg_start <= 1'b1;
          state <= S_AGG;
        end
        S_AGG: if (sync_results == 32'(cfg_n_nodes)) begin
          node <= '0; rb_g <= '0; rb_k <= '0;
          state <= S_RB_RD;
        end
        S_RB_RD: state <= S_RB_WR;             // Result Bank read, data next cycle
        S_RB_WR: begin
          if (!wr_req) begin
            wr_req <= 1'b1;
            wr_addr <= cfg_res_base + ADDR_W'(head) * cfg_res_stride + ADDR_W'(node) * cfg_res_nstride;
            wr_data <= rb_data;
          end else if (wr_ready) begin
            wr_req <= 1'b0;
            if (node == cfg_n_nodes - 1'b1) begin
              if (head == cfg_n_heads - 1'b1) state <= S_DONE;
              else begin
                head <= head + 1'b1;
                rs_base <= cfg_wgt_base + ADDR_W'(head + 1'b1) * cfg_wgt_stride;
                rs_count <= 32'(cfg_f_in); rs_issued <= '0; rs_got <= '0;
                wb <= '0; wa <= '0;
                state <= S_WGT;
              end
            end else begin
              node <= node + 1'b1;
              if (rb_k == (SAW+1)'(cfg_src_per_lane - 1'b1)) begin
                rb_k <= '0; rb_g <= rb_g + 1'b1;
              end else rb_k <= rb_k + 1'b1;
              state <= S_RB_RD;
            end
          end
        end
        S_DONE: begin
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // configuration the partition must respect
  a_cfg_tgt: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (32'(cfg_tgt_per_acm) * N_ACM >= 32'(cfg_n_nodes)
                                    && 32'(cfg_tgt_per_acm) <= TGT_MAX));
  a_cfg_src: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (32'(cfg_src_per_lane) * LANES >= 32'(cfg_n_nodes)
                                    && 32'(cfg_src_per_lane) <= SRC_MAX));
  a_cfg_fin: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (32'(cfg_f_in) <= F_IN_MAX && cfg_f_in != 0));

endmodule
