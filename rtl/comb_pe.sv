// comb_pe: one processing element of the Combination Module PE array.
//
// It multiplies a node feature element x (Q7.8) by a weight w (Q7.8) and registers the full
// 32-bit product (Q15.16), one product per clock. The array places ROWS x COLS of these: PE
// (r, c) holds the product of input feature r of the current chunk with column c of W, and the
// column adder tree that follows sums the products of a column. The source shows the PE grid
// and says it performs the linear transformations; the multiply-and-register insides are this
// design's choice. Latency: one cycle.
module comb_pe
  import oco_pkg::*;
(
  input  logic                     clk,
  input  data_t                    x,
  input  data_t                    w,
  output logic signed [2*DATA_W-1:0] prod
);

  always_ff @(posedge clk) prod <= x * w;

endmodule
