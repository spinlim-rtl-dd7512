// tb_stt_sot_cell: checks the stateful cell against the truth table
// B(i+1) = A*C + ~A*B(i) for all eight (B, A, C) cases, and that a cell with
// only one of its two access paths on keeps its state.
module tb_stt_sot_cell;
  logic clk = 1'b0;
  logic wl_stt, wl_sot, c, b;
  int checks = 0, failures = 0;

  stt_sot_cell dut (.clk, .wl_stt, .wl_sot, .c, .b);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_cell(input logic s, input logic p, input logic cv);
    wl_stt = s; wl_sot = p; c = cv;
    @(posedge clk); #1;
    wl_stt = 0; wl_sot = 0;
  endtask

  initial begin
    wl_stt = 0; wl_sot = 0; c = 0;
    for (int bi = 0; bi < 2; bi++)
      for (int a = 0; a < 2; a++)
        for (int cv = 0; cv < 2; cv++) begin
          logic exp_b;
          write_cell(1, 1, bi[0]);          // preset B
          write_cell(a[0], a[0], cv[0]);    // logic write with operand A
          exp_b = (a[0] & cv[0]) | (~a[0] & bi[0]);
          checks++;
          if (b !== exp_b) begin
            failures++;
            $display("FAIL B=%0d A=%0d C=%0d: got %0d want %0d", bi, a, cv, b, exp_b);
          end
        end
    // switching needs both currents
    for (int bi = 0; bi < 2; bi++) begin
      write_cell(1, 1, bi[0]);
      write_cell(1, 0, ~bi[0]);
      checks++; if (b !== bi[0]) begin failures++; $display("FAIL STT only switched"); end
      write_cell(0, 1, ~bi[0]);
      checks++; if (b !== bi[0]) begin failures++; $display("FAIL SOT only switched"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
