// write_driver: modified write driver of one column.
//
// It sets the write polarity C on the column's BL/SL from the two buffered
// bits C_i1, C_i2 of the operand P, the mode signal L and the cell select T:
//   L = 0 (memory mode):  T = 0 -> C_i1,  T = 1 -> C_i2
//   L = 1 (SpinLiM mode): T = 0 -> ~C_i1 (XNOR step of cell-1)
//                         T = 1 -> 0     (AND step of cell-2)
// The BL/SL voltages themselves are analog; this block gives the digital
// polarity only (1 = write high resistance). Purely combinational.
module write_driver (
  input  logic c_i1,   // buffered sign bit P1 of this column
  input  logic c_i2,   // buffered non-zero bit P2 of this column
  input  logic lim,    // L
  input  logic t_sel,  // T
  output logic c       // polarity driven onto BL/SL
);

  always_comb begin
    unique case ({lim, t_sel})
      2'b00:   c = c_i1;
      2'b01:   c = c_i2;
      2'b10:   c = ~c_i1;
      default: c = 1'b0;
    endcase
  end

endmodule
