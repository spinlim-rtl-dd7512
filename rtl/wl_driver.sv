// wl_driver: modified word-line driver of one row group (4 word lines),
// merged with the last level of the row decoder.
//
// Inputs: the decoded word line wl_i of the group, the mode signal L
// (0 = typical memory mode, 1 = SpinLiM mode), the logic operand Q, the
// last-level address T (0 = cell-1, 1 = cell-2) and Clk_SOT, the window in
// which the SOT current is supplied.
//   L = 0: wl_i itself drives the cell chosen by T.
//   L = 1: the chosen cell is driven with A = ~Q, so it is written when
//          Q = 0 and keeps its state when Q = 1.
// The STT word line follows the driven value; the SOT word line is that
// value gated by Clk_SOT. The cell that T does not choose stays off.
//
// This design's choice: in SpinLiM mode ~Q is also gated by wl_i, so only
// the addressed row group computes (the document gives WL_i* = ~Q without
// naming the row gating). Purely combinational.
module wl_driver (
  input  logic wl_i,     // decoded word line of this group
  input  logic lim,      // L: 0 = memory mode, 1 = SpinLiM mode
  input  logic q,        // logic operand Q (A = ~Q)
  input  logic t_sel,    // T: 0 = cell-1, 1 = cell-2
  input  logic clk_sot,  // SOT current window
  output logic wl_stt1,
  output logic wl_sot1,
  output logic wl_stt2,
  output logic wl_sot2
);

  logic wl_star;  // WL_i*: value passed on to the four word lines

  always_comb begin
    wl_star = lim ? (wl_i & ~q) : wl_i;
    wl_stt1 = wl_star & ~t_sel;
    wl_sot1 = wl_star & ~t_sel & clk_sot;
    wl_stt2 = wl_star & t_sel;
    wl_sot2 = wl_star & t_sel & clk_sot;
  end

endmodule
