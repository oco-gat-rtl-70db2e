// ext_mem_model: behavioural model of the external storage (DDR4 behind a memory controller)
// for simulation only. Word-addressed, WORD_W bits per word. A read accepted (rd_req and
// rd_ready) returns its word in order LAT cycles later on rd_valid/rd_data. rd_ready is low on
// about one cycle in four (pseudo-random) to exercise the controller's flow control; writes are
// accepted whenever wr_req is high. The testbench fills and inspects mem directly.
module ext_mem_model #(
  parameter int unsigned WORD_W = 256,
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned LAT    = 4
) (
  input  logic              clk,
  input  logic              rd_req,
  input  logic [31:0]       rd_addr,
  output logic              rd_ready,
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data,
  input  logic              wr_req,
  input  logic [31:0]       wr_addr,
  input  logic [WORD_W-1:0] wr_data,
  output logic              wr_ready
);

  logic [WORD_W-1:0] mem [DEPTH];
  logic              pv [LAT];
  logic [WORD_W-1:0] pd [LAT];
  int unsigned       not_ready_cycles = 0;

  initial begin
    rd_ready = 1'b1;
    for (int i = 0; i < LAT; i++) begin pv[i] = 1'b0; pd[i] = '0; end
  end

  assign wr_ready = 1'b1;
  assign rd_valid = pv[LAT-1];
  assign rd_data  = pd[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= rd_req && rd_ready;
    pd[0] <= (rd_req && rd_ready) ? mem[rd_addr % DEPTH] : '0;
    if (wr_req && wr_ready) mem[wr_addr % DEPTH] <= wr_data;
    if (rd_req && !rd_ready) not_ready_cycles++;
    rd_ready <= ($urandom % 4) != 0;
  end

endmodule
