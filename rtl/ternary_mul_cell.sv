// ternary_mul_cell: computing cell of the SpinLiM array, two stateful
// STT-SOT cells sharing one BL/SL pair.
//
// Cell-1 stores the sign bit P1 of a ternary operand, cell-2 its non-zero
// bit P2. The ternary product P*Q is formed in place by four writes driven
// from outside (word-line driver and write driver):
//   1. memory mode, cell-1: write P1
//   2. SpinLiM mode, cell-1: A = ~Q1, C = ~P1   -> B1 = XNOR(P1, Q1)
//   3. memory mode, cell-2: write P2
//   4. SpinLiM mode, cell-2: A = ~Q2, C = 0     -> B2 = AND(P2, Q2)
// This module holds only the two cells; the sequencing is elsewhere.
//
// Interface: one set of two word lines per cell, the shared write polarity
// c, and the two stored bits b1, b2. Timing as stt_sot_cell.
module ternary_mul_cell (
  input  logic clk,
  input  logic wl_stt1,
  input  logic wl_sot1,
  input  logic wl_stt2,
  input  logic wl_sot2,
  input  logic c,      // write polarity on the shared BL/SL
  output logic b1,     // cell-1 state (sign bit)
  output logic b2      // cell-2 state (non-zero bit)
);

  stt_sot_cell u_cell1 (.clk, .wl_stt(wl_stt1), .wl_sot(wl_sot1), .c, .b(b1));
  stt_sot_cell u_cell2 (.clk, .wl_stt(wl_stt2), .wl_sot(wl_sot2), .c, .b(b2));

endmodule
