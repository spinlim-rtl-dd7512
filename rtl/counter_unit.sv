// counter_unit: per-column accumulation of the ternary products.
//
// After the multiplications, each row group of the array holds one ternary
// product per column. Reading a group returns the two bits of every
// column; with acc = 1 this unit adds each column's product (-1, 0 or +1)
// to that column's signed counter. The column sums are the convolution
// outputs (one output pixel per column) or the fully connected outputs
// (one neuron per column).
//
// The document says the sums are formed by counters after read-out; the
// counter width ACC_W and the single read port (rd_sel -> rd_data,
// combinational) are this design's choices. clear has priority over acc.
module counter_unit
  import spinlim_pkg::*;
#(
  parameter int unsigned COLS  = 128,
  parameter int unsigned ACC_W = 16,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    acc,
  input  logic [COLS-1:0]         in1,     // read-out sign bits
  input  logic [COLS-1:0]         in2,     // read-out non-zero bits
  input  logic [CW-1:0]           rd_sel,
  output logic signed [ACC_W-1:0] rd_data
);

  logic signed [ACC_W-1:0] sum_q [COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < COLS; c++) sum_q[c] <= '0;
    end else if (clear) begin
      for (int unsigned c = 0; c < COLS; c++) sum_q[c] <= '0;
    end else if (acc) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        if (in2[c]) sum_q[c] <= in1[c] ? sum_q[c] + 1'b1 : sum_q[c] - 1'b1;
      end
    end
  end

  assign rd_data = sum_q[rd_sel];

endmodule
