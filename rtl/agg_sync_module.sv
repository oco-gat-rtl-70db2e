// agg_sync_module: the Aggregation Sync Module, an array of LANES Sync PEs and the Result Bank.
//
// Sync PE g gathers the partial sums of source-node group g from lane g of each of the N_ACM
// Aggregation Computing Modules, and computes the embeddings z_i of that group (sync_pe). Its
// results are written into its own bank of the Result Bank at the group-local source index, from
// where the Main Controller reads them (rb_lane, rb_addr; data one cycle later on rb_data).
// stall[m][g] is the nearly-full flag of Sync PE g's buffers for module m. n_results counts the
// embeddings written since clear. The array and the Result Bank follow the source; the banked
// organisation of the Result Bank is this design's choice.
module agg_sync_module
  import oco_pkg::*;
#(
  parameter int unsigned N_ACM      = 4,
  parameter int unsigned LANES      = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned SRC_MAX    = 256,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned AFULL_MARGIN = 16,
  localparam int unsigned SAW = $clog2(SRC_MAX),
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  input  logic [N_ACM-1:0][LANES-1:0]            in_valid,
  input  logic [N_ACM-1:0][LANES-1:0][SAW-1:0]   in_src,
  input  acc_t [N_ACM-1:0][LANES-1:0]            in_coeff,
  input  acc_t [N_ACM-1:0][LANES-1:0][COLS-1:0]  in_prod,
  output logic [N_ACM-1:0][LANES-1:0]            stall,
  input  logic [LW-1:0]                          rb_lane,
  input  logic [SAW-1:0]                         rb_addr,
  output data_t [COLS-1:0]                       rb_data,
  output logic [31:0]                            n_results,
  output logic [LANES-1:0]                       sync_waiting
);

  logic [LANES-1:0] res_valid;
  data_t [LANES-1:0][COLS-1:0] bank_rd;

  for (genvar g = 0; g < LANES; g++) begin : g_pe
    logic [N_ACM-1:0]            v;
    logic [N_ACM-1:0][SAW-1:0]   s;
    acc_t [N_ACM-1:0]            c;
    acc_t [N_ACM-1:0][COLS-1:0]  p;
    logic [N_ACM-1:0]            af;
    logic [SAW-1:0]              rsrc;
    data_t [COLS-1:0]            rz;
    for (genvar m = 0; m < N_ACM; m++) begin : g_m
      assign v[m] = in_valid[m][g];
      assign s[m] = in_src[m][g];
      assign c[m] = in_coeff[m][g];
      assign p[m] = in_prod[m][g];
      assign stall[m][g] = af[m];
    end
    sync_pe #(.N_ACM(N_ACM), .COLS(COLS), .SRC_W(SAW), .FIFO_DEPTH(FIFO_DEPTH),
              .AFULL_MARGIN(AFULL_MARGIN)) u_sync (
      .clk, .rst_n, .in_valid(v), .in_src(s), .in_coeff(c), .in_prod(p), .afull(af),
      .res_valid(res_valid[g]), .res_src(rsrc), .res_z(rz), .waiting(sync_waiting[g]));
    buffer_ram #(.DEPTH(SRC_MAX), .WIDTH(COLS * DATA_W)) u_bank (
      .clk, .we(res_valid[g]), .waddr(rsrc), .wdata(rz), .raddr(rb_addr), .rdata(bank_rd[g]));
  end

  logic [LW-1:0] rb_lane_q;
  assign rb_data = bank_rd[rb_lane_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rb_lane_q <= '0;
    else        rb_lane_q <= rb_lane;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     n_results <= '0;
    else if (clear) n_results <= '0;
    else            n_results <= n_results + 32'($countones(res_valid));
  end

endmodule
