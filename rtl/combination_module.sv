// combination_module: the Combination Module. For one node at a time it computes the
// combination result h' = W h (equation 7) and the left and right attention coefficients
// p = a1 . h' and q = a2 . h' (equation 8).
//
// How it works. A PE array of ROWS x COLS comb_pe multipliers holds one chunk of ROWS input
// features against ROWS rows of W^T per cycle; an adder tree per column sums the ROWS products
// and an accumulator adds the chunks up, so a node with F input features takes
// ceil(F / ROWS) cycles. The finished h' (saturated to Q7.8) then passes through two inner
// products with the attention kernels a1 and a2, and node id, h', p and q leave together.
// The Weight Buffer keeps W^T as ROWS banks (bank k mod ROWS, address k div ROWS holds the COLS
// weights of input feature k); the Node Feature Buffer keeps one node's features as
// ROWS/COLS banks of COLS-wide words (word w goes to bank w mod (ROWS/COLS), address
// w div (ROWS/COLS)). Features with index >= n_feat are forced to zero, so stale buffer words
// past the end of a node do no harm.
//
// Interface and timing. Writes to the buffers and to the kernel registers take one cycle each.
// start (with node_id, n_feat, n_chunks) begins a node; busy stays high while the buffers are
// read (n_chunks cycles), after which the feature buffer may be refilled. out_valid pulses
// n_chunks + 5 cycles after the clock edge that takes start. The array size of 5120 PEs
// follows the source; 320 x 16 is this design's reading of it (16 = the hidden dimension of
// three of the four data sets). The dataflow, number format and buffer organisation are this
// design's choices.
module combination_module
  import oco_pkg::*;
#(
  parameter int unsigned ROWS     = 320,
  parameter int unsigned COLS     = 16,
  parameter int unsigned F_IN_MAX = 4096,
  parameter int unsigned NODE_W   = 16,
  localparam int unsigned NCH     = (F_IN_MAX + ROWS - 1) / ROWS,
  localparam int unsigned CAW     = (NCH > 1) ? $clog2(NCH) : 1,
  localparam int unsigned FBANKS  = ROWS / COLS,
  localparam int unsigned RW      = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned FBW     = (FBANKS > 1) ? $clog2(FBANKS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // weight buffer write: COLS weights of one input feature
  input  logic                  wgt_we,
  input  logic [RW-1:0]         wgt_bank,
  input  logic [CAW-1:0]        wgt_addr,
  input  data_t [COLS-1:0]      wgt_data,
  // node feature buffer write: COLS consecutive features
  input  logic                  feat_we,
  input  logic [FBW-1:0]        feat_bank,
  input  logic [CAW-1:0]        feat_addr,
  input  data_t [COLS-1:0]      feat_data,
  // attention kernel write: sel 0 = a1 (left), 1 = a2 (right)
  input  logic                  kern_we,
  input  logic                  kern_sel,
  input  data_t [COLS-1:0]      kern_data,
  // command
  input  logic                  start,
  input  logic [NODE_W-1:0]     node_id,
  input  logic [15:0]           n_feat,
  input  logic [CAW:0]          n_chunks,
  output logic                  busy,
  // result
  output logic                  out_valid,
  output logic [NODE_W-1:0]     out_node,
  output data_t [COLS-1:0]      out_h,
  output data_t                 out_p,
  output data_t                 out_q
);

  localparam int unsigned SUM_W = 2 * DATA_W + RW + 1;
  localparam int unsigned HACC_W = SUM_W + CAW + 1;

  // ---------------- buffers ----------------
  logic [CAW-1:0] rd_chunk;
  data_t [ROWS-1:0][COLS-1:0] w_rd;
  data_t [FBANKS-1:0][COLS-1:0] f_rd;

  for (genvar r = 0; r < ROWS; r++) begin : g_wbuf
    buffer_ram #(.DEPTH(NCH), .WIDTH(COLS * DATA_W)) u_wbuf (
      .clk, .we(wgt_we && (wgt_bank == RW'(r))), .waddr(wgt_addr), .wdata(wgt_data),
      .raddr(rd_chunk), .rdata(w_rd[r])
    );
  end
  for (genvar b = 0; b < FBANKS; b++) begin : g_fbuf
    buffer_ram #(.DEPTH(NCH), .WIDTH(COLS * DATA_W)) u_fbuf (
      .clk, .we(feat_we && (feat_bank == FBW'(b))), .waddr(feat_addr), .wdata(feat_data),
      .raddr(rd_chunk), .rdata(f_rd[b])
    );
  end

  data_t [COLS-1:0] a1, a2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1 <= '0;
      a2 <= '0;
    end else if (kern_we) begin
      if (kern_sel) a2 <= kern_data;
      else          a1 <= kern_data;
    end
  end

  // ---------------- chunk sequencer ----------------
  typedef struct packed {
    logic              valid;
    logic              first;
    logic              last;
    logic [NODE_W-1:0] node;
  } tag_t;

  logic [CAW:0]      cnt, total;
  logic [NODE_W-1:0] cur_node;
  logic [15:0]       cur_nfeat;
  tag_t              t0, t1, t2, t3;
  logic [CAW-1:0]    chunk1;

  assign busy = (cnt != total);
  assign rd_chunk = cnt[CAW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      total <= '0;
      cur_node <= '0;
      cur_nfeat <= '0;
      t0 <= '0;
      chunk1 <= '0;
    end else begin
      t0 <= '0;
      if (start && !busy) begin
        cnt <= '0;
        total <= n_chunks;
        cur_node <= node_id;
        cur_nfeat <= n_feat;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        t0 <= '{valid: 1'b1, first: (cnt == 0), last: (cnt == total - 1'b1), node: cur_node};
        chunk1 <= cnt[CAW-1:0];
      end
    end
  end

  // ---------------- PE array ----------------
  // t0 marks the cycle the buffer words are on w_rd / f_rd; the PEs register the products.
  data_t [ROWS-1:0] x_in;
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      x_in[r] = f_rd[r / COLS][r % COLS];
      if ((32'(chunk1) * ROWS + 32'(r)) >= 32'(cur_nfeat)) x_in[r] = '0;
    end
  end

  logic signed [2*DATA_W-1:0] prod [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      comb_pe u_pe (.clk, .x(x_in[r]), .w(w_rd[r][c]), .prod(prod[r][c]));
    end
  end

  // column adder trees
  logic signed [SUM_W-1:0] col_sum_c [COLS];
  logic signed [SUM_W-1:0] col_sum   [COLS];
  for (genvar c = 0; c < COLS; c++) begin : g_colsum
    always_comb begin
      col_sum_c[c] = '0;
      for (int r = 0; r < ROWS; r++) col_sum_c[c] += SUM_W'(prod[r][c]);
    end
  end

  logic signed [HACC_W-1:0] hacc [COLS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0;
      t2 <= '0;
      t3 <= '0;
      for (int c = 0; c < COLS; c++) begin
        col_sum[c] <= '0;
        hacc[c] <= '0;
      end
    end else begin
      t1 <= t0;                       // products registered in the PEs
      t2 <= t1;                       // column sums registered
      for (int c = 0; c < COLS; c++) col_sum[c] <= col_sum_c[c];
      t3 <= '0;
      if (t2.valid) begin             // accumulate the chunks of one node
        for (int c = 0; c < COLS; c++)
          hacc[c] <= t2.first ? HACC_W'(col_sum[c]) : hacc[c] + HACC_W'(col_sum[c]);
        t3 <= t2.last ? t2 : '0;
      end
    end
  end

  // h' of the finished node, then the attention-kernel inner products
  data_t [COLS-1:0] h_fin;
  always_comb begin
    for (int c = 0; c < COLS; c++) h_fin[c] = sat_data(64'(hacc[c] >>> FRAC));
  end

  logic signed [47:0] pdot, qdot;
  always_comb begin
    pdot = '0;
    qdot = '0;
    for (int c = 0; c < COLS; c++) begin
      pdot += 48'(a1[c] * h_fin[c]);
      qdot += 48'(a2[c] * h_fin[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_node <= '0;
      out_h <= '0;
      out_p <= '0;
      out_q <= '0;
    end else begin
      out_valid <= t3.valid;
      if (t3.valid) begin
        out_node <= t3.node;
        out_h <= h_fin;
        out_p <= sat_data(64'(pdot >>> FRAC));
        out_q <= sat_data(64'(qdot >>> FRAC));
      end
    end
  end

endmodule
