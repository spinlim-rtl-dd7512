// row_decoder: decodes a row-group address into one-hot word lines WL_i.
//
// The document shows the decoder only as a block feeding the word-line
// drivers; this is a plain binary-to-one-hot decoder with an enable (all
// lines low when en = 0). Purely combinational.
module row_decoder #(
  parameter int unsigned ROWS = 128,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] wl
);

  always_comb begin
    wl = '0;
    for (int unsigned i = 0; i < ROWS; i++) begin
      wl[i] = en && (addr == AW'(i));
    end
  end

endmodule
