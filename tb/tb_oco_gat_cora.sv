// tb_oco_gat_cora: a Cora-sized workload on the accelerator at its default parameters. The graph
// has Cora's node count (2708) and input feature length (1433, 5 chunks of 320), and runs the
// first GAT layer with 8 heads of hidden size 16, so every one of the 2708 x 8 embeddings is
// checked. The edges are random (about 1 in 700 node pairs, about Cora's average degree, plus a
// skewed part that is denser in sub-slice 0 so lanes stall and Sync PEs wait); feature values,
// weights and attention kernels are random too. Checking and mechanism counting are shared with
// the other end-to-end benches. A watchdog ends the run as failed after T_MAXCYC cycles.
module tb_oco_gat_cora;
  import oco_pkg::*;

  localparam int T_N_ACM = 4, T_LANES = 16, T_COLS = 16, T_ROWS = 320, T_MEM = 524288;
  localparam int T_N = 2708, T_F = 1433, T_H = 8, T_MAXCYC = 8000000;
  localparam int T_DENSE = 64, T_SPARSE = 700;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic [15:0] cfg_n_nodes, cfg_f_in, cfg_tgt_per_acm, cfg_src_per_lane;
  logic [7:0] cfg_n_heads;
  logic [31:0] cfg_adj_base, cfg_wgt_base, cfg_wgt_stride, cfg_feat_base, cfg_feat_stride;
  logic [31:0] cfg_res_base, cfg_res_stride, cfg_res_nstride;
  logic rd_req, rd_ready, rd_valid, wr_req, wr_ready;
  logic [31:0] rd_addr, wr_addr;
  logic [T_COLS*16-1:0] rd_data, wr_data;
  logic [T_N_ACM-1:0][T_LANES-1:0] lane_stall;
  logic [T_LANES-1:0] sync_waiting;

  oco_gat_top dut (.*);

  ext_mem_model #(.WORD_W(T_COLS * 16), .DEPTH(T_MEM)) u_mem (.*);

  `include "tb_oco_body.svh"

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T_MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: no done after %0d cycles", T_MAXCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
