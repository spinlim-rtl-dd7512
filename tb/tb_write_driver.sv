// tb_write_driver: exhaustive check of the write driver's four modes:
// memory mode writes C_i1 / C_i2, SpinLiM mode writes ~C_i1 (XNOR step) or
// 0 (AND step).
module tb_write_driver;
  logic c_i1, c_i2, lim, t_sel, c;
  int checks = 0, failures = 0;

  write_driver dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic want;
      {c_i1, c_i2, lim, t_sel} = 4'(v);
      #1;
      if (!lim) want = t_sel ? c_i2 : c_i1;
      else      want = t_sel ? 1'b0 : !c_i1;
      checks++;
      if (c !== want) begin
        failures++;
        $display("FAIL in=%04b got %0d want %0d", v[3:0], c, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
