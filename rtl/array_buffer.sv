// array_buffer: the per-column buffer in front of the write drivers.
//
// Holds, for each of the COLS columns, the two bits C_i1 (sign P1) and C_i2
// (non-zero P2) of the ternary operand P of the row being computed. It is
// filled either all at once from a memory word (load, for a fully
// connected weight row) or one column per cycle (wr, used to gather a
// shifted input window for convolution). clear sets every column to the
// ternary value 0. Columns whose keep bit is 0 are loaded with 0, so unused
// columns multiply to 0.
//
// The document names the buffer and its two outputs per column; the load
// ports are this design's choice. Priority: clear, then load, then wr.
// All updates take effect at the rising clock edge.
module array_buffer
  import spinlim_pkg::*;
#(
  parameter int unsigned COLS = 128,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            load,
  input  trit_t [COLS-1:0] load_data,
  input  logic [COLS-1:0] load_keep,
  input  logic            wr,
  input  logic [CW-1:0]   wr_idx,
  input  trit_t           wr_data,
  output logic [COLS-1:0] c1,   // C_i1 of every column
  output logic [COLS-1:0] c2    // C_i2 of every column
);

  trit_t [COLS-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
    end else if (load) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        buf_q[c] <= load_keep[c] ? load_data[c] : trit_t'(2'b00);
      end
    end else if (wr) begin
      buf_q[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      c1[c] = buf_q[c].p1;
      c2[c] = buf_q[c].p2;
    end
  end

endmodule
