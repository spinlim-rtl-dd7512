// tb_wl_driver: exhaustive check of the word-line driver over all 32 input
// combinations against the intended behaviour: memory mode passes WL_i to
// the cell chosen by T, SpinLiM mode passes ~Q (for the addressed group),
// SOT word lines only inside the Clk_SOT window.
module tb_wl_driver;
  logic wl_i, lim, q, t_sel, clk_sot;
  logic wl_stt1, wl_sot1, wl_stt2, wl_sot2;
  int checks = 0, failures = 0;

  wl_driver dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic a;
      logic [3:0] want, got;
      {wl_i, lim, q, t_sel, clk_sot} = 5'(v);
      #1;
      a = wl_i && (!lim || !q);
      want = {a && !t_sel, a && !t_sel && clk_sot, a && t_sel, a && t_sel && clk_sot};
      got  = {wl_stt1, wl_sot1, wl_stt2, wl_sot2};
      checks++;
      if (got !== want) begin
        failures++;
        $display("FAIL in=%05b got %04b want %04b", v[4:0], got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
