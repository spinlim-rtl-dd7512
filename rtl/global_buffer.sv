// global_buffer: buffer of ternary input activations / feature maps.
//
// DEPTH ternary values, one per address, so that the mapping control can
// gather any pixel of a feature map (laid out channel by channel, row by
// row) or any input neuron of a fully connected layer. One write port for
// loading and one read port with one cycle of latency. The document names
// the buffer only; its organisation is this design's choice.
module global_buffer
  import spinlim_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  trit_t         wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output trit_t         rdata
);

  trit_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
