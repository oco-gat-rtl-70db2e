// computing_pe: one Computing PE of an Aggregation Computing Module (VPU plus the coefficient
// and product accumulators).
//
// For every node pair (i, j) it computes e_ij = LeakyReLU(p_i + q_j) (1st Step, equation 9),
// e'_ij = exp(e_ij) (2nd Step, equation 10) and e'_ij * h'_j (3rd Step, equation 11), and adds
// e'_ij and the COLS-element product into the Coeff Reg and Product Reg of the current source
// node. When the pair flagged last of its source node has been added, the two sums leave on the
// out_* port together with the source id, and the registers start afresh with the next pair.
// The source id travels through a register in every step, so pairs of consecutive source nodes
// follow each other with no gap (the node-pair-grained pipeline).
//
// Pipeline: 1st Step 3 stages (input register, add, LeakyReLU), 2nd Step 4 stages (scale by
// log2 e, table lookup, interpolation, shift), 3rd Step 3 stages (multiply, accumulate, output
// register): out_valid follows the in_valid of the source's last pair by 10 cycles, and one pair
// can enter every cycle. The step structure follows the source; the stage counts are read from
// its pipeline chart; number formats, the exp method and the LeakyReLU slope 0.2 are this
// design's choices. An empty token (a source with no neighbour in this sub-slice) adds nothing
// but still closes its source node, so every source yields exactly one output.
module computing_pe
  import oco_pkg::*;
#(
  parameter int unsigned COLS  = 16,
  parameter int unsigned SRC_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [SRC_W-1:0]      in_src,
  input  logic                  in_last,
  input  logic                  in_empty,
  input  data_t                 in_p,
  input  data_t                 in_q,
  input  data_t [COLS-1:0]      in_h,
  output logic                  out_valid,
  output logic [SRC_W-1:0]      out_src,
  output acc_t                  out_coeff,
  output acc_t [COLS-1:0]       out_prod
);

  localparam int unsigned NST = 9;   // stages 1..9 carry tags; stage 10 is the output register

  typedef struct packed {
    logic             valid;
    logic             last;
    logic             empty;
    logic [SRC_W-1:0] src;
  } tag_t;

  tag_t             tg [1:NST];
  data_t [COLS-1:0] hd [1:7];        // h'_j delayed to meet e'_ij at the 3rd Step

  // 1st Step
  data_t p1, q1, s2, e3;
  // 2nd Step
  logic signed [33:0] t4;
  logic [17:0] lb5, ln5, m6;
  logic [7:0]  fr5;
  logic signed [11:0] n5, n6;
  coef_t ep7;
  // 3rd Step
  coef_t ep8;
  logic signed [ACC_W-1:0] pr8 [COLS];
  acc_t coeff_reg;
  acc_t [COLS-1:0] prod_reg;
  logic fresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= NST; s++) tg[s] <= '0;
      for (int s = 1; s <= 7; s++) hd[s] <= '0;
      p1 <= '0; q1 <= '0; s2 <= '0; e3 <= '0;
      t4 <= '0; lb5 <= '0; ln5 <= '0; fr5 <= '0; n5 <= '0; n6 <= '0; m6 <= '0; ep7 <= '0;
      ep8 <= '0;
      for (int c = 0; c < COLS; c++) pr8[c] <= '0;
      coeff_reg <= '0;
      prod_reg <= '0;
      fresh <= 1'b1;
      out_valid <= 1'b0;
      out_src <= '0;
      out_coeff <= '0;
      out_prod <= '0;
    end else begin
      // tags and the h'_j delay line
      tg[1] <= '{valid: in_valid, last: in_last, empty: in_empty, src: in_src};
      for (int s = 2; s <= NST; s++) tg[s] <= tg[s-1];
      hd[1] <= in_h;
      for (int s = 2; s <= 7; s++) hd[s] <= hd[s-1];

      // ---- 1st Step: e = LeakyReLU(p + q)
      p1 <= in_p;
      q1 <= in_q;
      s2 <= sat_data(64'(p1) + 64'(q1));
      e3 <= leaky_relu(s2);

      // ---- 2nd Step: e' = exp(e)
      t4  <= exp_scale(e3);
      lb5 <= exp2_lut({1'b0, t4[21:16]});
      ln5 <= exp2_lut({1'b0, t4[21:16]} + 7'd1);
      fr5 <= t4[15:8];
      n5  <= 12'(t4 >>> 22);
      m6  <= lb5 + 18'((26'(ln5 - lb5) * 26'(fr5)) >> 8);
      n6  <= n5;
      ep7 <= exp_shift(m6, n6);

      // ---- 3rd Step: multiply, accumulate, output
      ep8 <= tg[7].empty ? '0 : ep7;
      for (int c = 0; c < COLS; c++)
        pr8[c] <= tg[7].empty ? '0 : ACC_W'(($signed({1'b0, ep7}) * hd[7][c]) >>> FRAC);

      if (tg[8].valid) begin
        coeff_reg <= (fresh ? '0 : coeff_reg) + acc_t'(ep8);
        for (int c = 0; c < COLS; c++)
          prod_reg[c] <= (fresh ? '0 : prod_reg[c]) + pr8[c];
        fresh <= tg[8].last;
      end

      out_valid <= tg[9].valid && tg[9].last;
      if (tg[9].valid && tg[9].last) begin
        out_src <= tg[9].src;
        out_coeff <= coeff_reg;
        out_prod <= prod_reg;
      end
    end
  end

endmodule
