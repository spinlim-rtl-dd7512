// weight_memory: the typical memory array holding the TNN weights.
//
// DEPTH words of COLS ternary values each (2 bits per value, see
// spinlim_pkg). A fully connected layer keeps one weight row (the weights
// from one input neuron to up to COLS output neurons) per word; a
// convolution kernel is kept as a flat list of values, COLS per word.
// One write port for loading and one read port with one cycle of latency.
// The document names this memory but gives no organisation; word width,
// depth and ports are this design's choices.
module weight_memory
  import spinlim_pkg::*;
#(
  parameter int unsigned COLS  = 128,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  trit_t [COLS-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output trit_t [COLS-1:0] rdata
);

  trit_t [COLS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
