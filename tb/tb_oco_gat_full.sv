// tb_oco_gat_full: end-to-end test of the accelerator with every parameter at its default
// (4 modules x 16 lanes, 320 x 16 combination array). A 512-node graph with 400 input features
// (2 chunks) and 2 attention heads is written into the storage model, the accelerator runs, and
// every embedding is compared with a reference model; the run must show lane stalls, Sync
// waits, empty tokens, an isolated node, read backpressure and both heads. A watchdog ends the
// run as failed after T_MAXCYC cycles.
module tb_oco_gat_full;
  import oco_pkg::*;

  localparam int T_N_ACM = 4, T_LANES = 16, T_COLS = 16, T_ROWS = 320, T_MEM = 65536;
  localparam int T_N = 512, T_F = 400, T_H = 2, T_MAXCYC = 2000000;
  localparam int T_DENSE = 4, T_SPARSE = 40;

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
