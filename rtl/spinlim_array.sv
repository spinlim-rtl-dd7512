// spinlim_array: the reconfigurable SpinLiM computing array.
//
// GROUPS row groups by COLS columns of computing cells (ternary_mul_cell,
// two stateful STT-SOT cells each). Every column has its own write driver,
// so one write reaches all COLS cells of the addressed row group at once;
// every row group has its own word-line driver, fed by the row decoder.
//
// One operation per clock cycle, chosen by the control inputs:
//   clk_sot = 1: a write to row group `addr`, cell chosen by t_sel.
//                lim = 0: memory mode, the column writes c1 (T=0) / c2 (T=1).
//                lim = 1: SpinLiM mode, operand A = ~q; T=0 gives
//                         B1 = XNOR(B1, q) when c1 holds B1, T=1 gives
//                         B2 = AND(B2, q).
//   rd_en = 1:   read of row group `addr`: both bits of every column are
//                returned on out1/out2 one cycle later.
// A full ternary multiplication of one row group with operand Q is the
// four-write sequence write P1, XNOR Q1, write P2, AND Q2 (4 cycles).
//
// The document's array has COLS = 128 computing columns plus two reference
// columns, and 128 groups of 4 word lines. The reference columns and the
// current-mean sense amplifiers are analog and not modelled: the read port
// returns the stored bits directly through a register that stands for the
// sense-amplifier latch (this design's choice, as is reading both cells of
// a group in the same cycle). Cells have no reset (non-volatile).
module spinlim_array #(
  parameter int unsigned COLS   = 128,
  parameter int unsigned GROUPS = 128,
  localparam int unsigned AW = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   addr,     // row group
  input  logic            lim,      // L: 0 memory mode, 1 SpinLiM mode
  input  logic            t_sel,    // T: 0 cell-1, 1 cell-2
  input  logic            q,        // logic operand Q of the row group
  input  logic            clk_sot,  // write pulse (SOT current window)
  input  logic [COLS-1:0] c1,       // array buffer, sign bits P1
  input  logic [COLS-1:0] c2,       // array buffer, non-zero bits P2
  input  logic            rd_en,    // read the addressed row group
  output logic [COLS-1:0] out1,     // read data, cell-1 bits
  output logic [COLS-1:0] out2      // read data, cell-2 bits
);

  logic [GROUPS-1:0] wl;            // decoded word lines
  logic [COLS-1:0]   c_col;         // write polarity per column
  logic [COLS-1:0]   b1 [GROUPS];   // cell-1 states
  logic [COLS-1:0]   b2 [GROUPS];   // cell-2 states

  row_decoder #(.ROWS(GROUPS)) u_dec (
    .en  (clk_sot | rd_en),
    .addr(addr),
    .wl  (wl)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_col
    write_driver u_wd (
      .c_i1 (c1[c]),
      .c_i2 (c2[c]),
      .lim  (lim),
      .t_sel(t_sel),
      .c    (c_col[c])
    );
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_row
    logic wl_stt1, wl_sot1, wl_stt2, wl_sot2;

    wl_driver u_wld (
      .wl_i   (wl[g]),
      .lim    (lim),
      .q      (q),
      .t_sel  (t_sel),
      .clk_sot(clk_sot),
      .wl_stt1(wl_stt1),
      .wl_sot1(wl_sot1),
      .wl_stt2(wl_stt2),
      .wl_sot2(wl_sot2)
    );

    for (genvar c = 0; c < COLS; c++) begin : g_cell
      ternary_mul_cell u_cell (
        .clk    (clk),
        .wl_stt1(wl_stt1),
        .wl_sot1(wl_sot1),
        .wl_stt2(wl_stt2),
        .wl_sot2(wl_sot2),
        .c      (c_col[c]),
        .b1     (b1[g][c]),
        .b2     (b2[g][c])
      );
    end
  end

  // Sense-amplifier latch: registered read of the addressed group.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1 <= '0;
      out2 <= '0;
    end else if (rd_en) begin
      out1 <= b1[addr];
      out2 <= b2[addr];
    end
  end

endmodule
