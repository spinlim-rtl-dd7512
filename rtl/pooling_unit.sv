// pooling_unit: max pooling of a stream of column sums.
//
// The mapping control sends the values of one pooling window back to back
// (WIN values, WIN = 4 for 2x2 pooling). The unit keeps the running
// maximum and emits it after the last value of the window. With bypass = 1
// every input is passed on unchanged (fully connected layers, or a
// convolution without pooling). clear restarts the window count.
//
// The document only names a pooling unit; max pooling over a window sent
// in order is this design's choice. Output is registered: out_valid comes
// one cycle after the in_valid that completes a window.
module pooling_unit #(
  parameter int unsigned W   = 16,
  parameter int unsigned WIN = 4,
  localparam int unsigned NW = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                bypass,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  logic [NW-1:0]       cnt_q;
  logic signed [W-1:0] max_q;
  logic signed [W-1:0] max_new;

  always_comb begin
    max_new = (cnt_q == '0 || in_data > max_q) ? in_data : max_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      max_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        cnt_q <= '0;
      end else if (in_valid) begin
        if (bypass) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else if (cnt_q == NW'(WIN - 1)) begin
          cnt_q     <= '0;
          out_valid <= 1'b1;
          out_data  <= max_new;
        end else begin
          cnt_q <= cnt_q + 1'b1;
          max_q <= max_new;
        end
      end
    end
  end

endmodule
