// buffer_ram: simple dual-port on-chip buffer with one write port and one registered read port.
//
// Every on-chip memory of the accelerator is an instance of this block: the weight and node
// feature buffers of the Combination Module, the left-attention, right-attention,
// combination-result and adjacency buffers of each Aggregation Computing Module lane, and the
// Result Bank. It models a block RAM: a write lands at the rising edge when we is high; a read
// presents raddr and the word appears on rdata one cycle later (read-before-write when both
// ports hit the same address). Contents are not reset. The source names the buffers and what
// they hold; the one-cycle synchronous read is this design's choice.
module buffer_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
