// stt_sot_cell: one STT-SOT p-MTJ memory cell used as a stateful logic gate.
//
// The cell has two access transistors, one in the STT path (word line
// wl_stt) and one in the SOT path (word line wl_sot). The voltage across
// BL/SL sets the polarity C the write tends to store. Following the
// document's truth table, the next state is
//     B(i+1) = A*C + ~A*B(i)
// where A means "the access transistors are on". With C = 0 this is
// ~A*B (AND-type), with C = 1 it is A+B (OR), with C = ~B it is A^B (XOR).
//
// Modelling choices of this design: the magnetic switching is reduced to one
// clock edge; the cell switches only when both the STT and the SOT current
// flow (wl_stt and wl_sot both high; wl_sot is already gated by the SOT
// pulse in the word-line driver). The stored bit is non-volatile, so it has
// no reset: its content is whatever was last written.
//
// Timing: a write is one rising edge of clk; b changes right after it.
module stt_sot_cell (
  input  logic clk,
  input  logic wl_stt,  // STT access transistor on
  input  logic wl_sot,  // SOT access transistor on (pulse-gated)
  input  logic c,       // write polarity across BL/SL (operand C)
  output logic b        // stored state, 1 = high resistance (operand B)
);

  always_ff @(posedge clk) begin
    if (wl_stt && wl_sot) b <= c;
  end

endmodule
