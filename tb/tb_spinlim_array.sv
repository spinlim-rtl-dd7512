// tb_spinlim_array: drives the array the way the mapping control does and
// checks the products.
//  1. memory mode: write random two-bit values into every group, read back.
//  2. for every row group, a random ternary row P and a random Q are
//     multiplied in place by the four-write sequence (one cycle per write,
//     four cycles per parallel multiplication); then all groups are read
//     and every column is compared with the integer product P[c]*Q, which
//     also shows that a write to one group leaves the others alone.
module tb_spinlim_array;
  localparam int COLS = 16, GROUPS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] addr;
  logic lim, t_sel, q, clk_sot, rd_en;
  logic [COLS-1:0] c1, c2, out1, out2;
  int checks = 0, failures = 0;

  spinlim_array #(.COLS(COLS), .GROUPS(GROUPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p_val [GROUPS][COLS];
  int q_val [GROUPS];

  task automatic op(input int g, input logic l, input logic t, input logic qv, input logic w, input logic r);
    addr = 3'(g); lim = l; t_sel = t; q = qv; clk_sot = w; rd_en = r;
    @(posedge clk); #1;
    clk_sot = 0; rd_en = 0;
  endtask

  initial begin
    int cyc0, ncyc;
    {addr, lim, t_sel, q, clk_sot, rd_en} = '0;
    c1 = '0; c2 = '0;
    #12 rst_n = 1'b1;

    // 1. plain memory use
    begin
      logic [COLS-1:0] m1 [GROUPS], m2 [GROUPS];
      for (int g = 0; g < GROUPS; g++) begin
        m1[g] = COLS'($urandom); m2[g] = COLS'($urandom);
        c1 = m1[g]; c2 = m2[g];
        op(g, 0, 0, 0, 1, 0);
        op(g, 0, 1, 0, 1, 0);
      end
      for (int g = 0; g < GROUPS; g++) begin
        op(g, 0, 0, 0, 0, 1);
        checks++;
        if (out1 !== m1[g] || out2 !== m2[g]) begin
          failures++; $display("FAIL memory-mode readback group %0d", g);
        end
      end
    end

    // 2. parallel ternary multiplication
    for (int g = 0; g < GROUPS; g++) begin
      logic q1, q2;
      q_val[g] = int'($urandom_range(0, 2)) - 1;
      for (int c = 0; c < COLS; c++) begin
        p_val[g][c] = int'($urandom_range(0, 2)) - 1;
        c1[c] = (p_val[g][c] > 0);
        c2[c] = (p_val[g][c] != 0);
      end
      q1 = (q_val[g] > 0); q2 = (q_val[g] != 0);
      cyc0 = $time;
      op(g, 0, 0, 0,  1, 0);   // write P1
      op(g, 1, 0, q1, 1, 0);   // XNOR with Q1
      op(g, 0, 1, 0,  1, 0);   // write P2
      op(g, 1, 1, q2, 1, 0);   // AND with Q2
      ncyc = (int'($time) - cyc0) / 10;
      checks++;
      if (ncyc != 4) begin failures++; $display("FAIL multiplication took %0d cycles", ncyc); end
    end
    c1 = '0; c2 = '0;
    for (int g = 0; g < GROUPS; g++) begin
      op(g, 0, 0, 0, 0, 1);
      for (int c = 0; c < COLS; c++) begin
        int got;
        got = out2[c] ? (out1[c] ? 1 : -1) : 0;
        checks++;
        if (got != p_val[g][c] * q_val[g]) begin
          failures++;
          $display("FAIL g=%0d c=%0d P=%0d Q=%0d got %0d", g, c, p_val[g][c], q_val[g], got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
