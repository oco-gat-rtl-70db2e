// sync_pe: one Sync PE of the Aggregation Sync Module. It finishes equation (12) for the source
// nodes of one group: z_i = ELU( sum_j e'_ij h'_j / sum_k e'_ik ).
//
// Each of the N_ACM Aggregation Computing Modules sends it, per source node, a partial
// coefficient sum and a partial product vector over the neighbours in its sub-slice. They are
// queued in a Coeff Buffer and a Product Buffer per module, so a Computing PE can go on with the
// next source node while the others catch up. When every module's buffers hold an entry, the
// heads (which belong to the same source node) are taken together and pass three stages:
//   stage 1  sum the N_ACM partial coefficient sums and product vectors;
//   stage 2  divide each product sum by the coefficient sum (one division per node and
//            output element, none per node pair);
//   stage 3  ELU, then res_valid with the source id and the COLS-element embedding z.
// A node whose coefficient sum is zero (no neighbour at all) gives z = ELU(0) = 0.
// afull[m] rises when buffer m has fewer than AFULL_MARGIN free entries; it is the stall
// sent back to lane issuing, sized to cover the tasks still in flight. The buffer names, the
// sum/divide/ELU order and the three Sync stages follow the source; buffer depth, the
// stall handshake and the fixed-point division are this design's choices.
module sync_pe
  import oco_pkg::*;
#(
  parameter int unsigned N_ACM        = 4,
  parameter int unsigned COLS         = 16,
  parameter int unsigned SRC_W        = 8,
  parameter int unsigned FIFO_DEPTH   = 32,
  parameter int unsigned AFULL_MARGIN = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_ACM-1:0]              in_valid,
  input  logic [N_ACM-1:0][SRC_W-1:0]   in_src,
  input  acc_t [N_ACM-1:0]              in_coeff,
  input  acc_t [N_ACM-1:0][COLS-1:0]    in_prod,
  output logic [N_ACM-1:0]              afull,
  output logic                          res_valid,
  output logic [SRC_W-1:0]              res_src,
  output data_t [COLS-1:0]              res_z,
  output logic                          waiting     // some buffer holds data, another is empty
);

  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned SW  = ACC_W + $clog2(N_ACM) + 1;

  typedef struct packed {
    logic [SRC_W-1:0] src;
    acc_t             coeff;
  } coeff_ent_t;

  logic [N_ACM-1:0] c_empty, p_empty;
  coeff_ent_t [N_ACM-1:0] c_head;
  acc_t [N_ACM-1:0][COLS-1:0] p_head;
  logic pop;

  for (genvar m = 0; m < N_ACM; m++) begin : g_in
    logic [FAW:0] c_count, p_count;
    logic c_full, p_full;  // unused: afull keeps both buffers from filling
    sync_fifo #(.WIDTH($bits(coeff_ent_t)), .DEPTH(FIFO_DEPTH)) u_coeff_buf (
      .clk, .rst_n, .push(in_valid[m]), .wdata({in_src[m], in_coeff[m]}), .pop,
      .rdata(c_head[m]), .empty(c_empty[m]), .full(c_full), .count(c_count));
    sync_fifo #(.WIDTH(COLS * ACC_W), .DEPTH(FIFO_DEPTH)) u_prod_buf (
      .clk, .rst_n, .push(in_valid[m]), .wdata(in_prod[m]), .pop,
      .rdata(p_head[m]), .empty(p_empty[m]), .full(p_full), .count(p_count));
    assign afull[m] = (c_count > (FAW+1)'(FIFO_DEPTH - AFULL_MARGIN));
  end

  assign pop = !(|c_empty) && !(|p_empty);
  assign waiting = (|c_empty) && !(&c_empty);

  // stage 1: sums
  logic                   v1;
  logic [SRC_W-1:0]       src1;
  logic signed [SW-1:0]   csum1;
  logic signed [SW-1:0]   psum1 [COLS];
  // stage 2: quotients
  logic                   v2;
  logic [SRC_W-1:0]       src2;
  data_t [COLS-1:0]       q2;

  logic signed [SW-1:0] csum_c;
  logic signed [SW-1:0] psum_c [COLS];
  always_comb begin
    csum_c = '0;
    for (int c = 0; c < COLS; c++) psum_c[c] = '0;
    for (int m = 0; m < N_ACM; m++) begin
      csum_c += SW'(c_head[m].coeff);
      for (int c = 0; c < COLS; c++) psum_c[c] += SW'(p_head[m][c]);
    end
  end

  data_t [COLS-1:0] q_c;
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic signed [SW+FRAC-1:0] num;
      num = (SW+FRAC)'(psum1[c]) <<< FRAC;
      if (csum1 == 0) q_c[c] = '0;
      else            q_c[c] = sat_data(64'(num / (SW+FRAC)'(csum1)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; src1 <= '0; csum1 <= '0;
      for (int c = 0; c < COLS; c++) psum1[c] <= '0;
      v2 <= 1'b0; src2 <= '0; q2 <= '0;
      res_valid <= 1'b0; res_src <= '0; res_z <= '0;
    end else begin
      v1 <= pop;
      if (pop) begin
        src1 <= c_head[0].src;
        csum1 <= csum_c;
        for (int c = 0; c < COLS; c++) psum1[c] <= psum_c[c];
      end
      v2 <= v1;
      if (v1) begin
        src2 <= src1;
        q2 <= q_c;
      end
      res_valid <= v2;
      if (v2) begin
        res_src <= src2;
        for (int c = 0; c < COLS; c++) res_z[c] <= elu(q2[c]);
      end
    end
  end

  // the heads taken together must belong to the same source node
  for (genvar m = 1; m < N_ACM; m++) begin : g_chk
    a_same_src: assert property (@(posedge clk) disable iff (!rst_n)
      pop |-> (c_head[m].src == c_head[0].src));
  end

endmodule
