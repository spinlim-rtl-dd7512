// tb_row_decoder: every address gives exactly its own word line; with the
// enable low no line is on.
module tb_row_decoder;
  localparam int ROWS = 128;
  logic en;
  logic [6:0] addr;
  logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(ROWS)) dut (.en, .addr, .wl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        logic [ROWS-1:0] want;
        en = e[0]; addr = 7'(a);
        #1;
        want = '0;
        if (e != 0) want[a] = 1'b1;
        checks++;
        if (wl !== want) begin
          failures++;
          $display("FAIL en=%0d addr=%0d", e, a);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
