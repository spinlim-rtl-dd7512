// tb_ternary_mul_cell: runs the four-write ternary multiplication on one
// computing cell for all nine (P, Q) pairs and for both encodings of 0, and
// compares (B1, B2) with the integer product P*Q.
module tb_ternary_mul_cell;
  logic clk = 1'b0;
  logic wl_stt1, wl_sot1, wl_stt2, wl_sot2, c, b1, b2;
  int checks = 0, failures = 0;

  ternary_mul_cell dut (.clk, .wl_stt1, .wl_sot1, .wl_stt2, .wl_sot2, .c, .b1, .b2);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one write: cell 1 or 2, access on or off, polarity
  task automatic wr(input int which, input logic a, input logic cv);
    wl_stt1 = (which == 1) & a; wl_sot1 = (which == 1) & a;
    wl_stt2 = (which == 2) & a; wl_sot2 = (which == 2) & a;
    c = cv;
    @(posedge clk); #1;
    {wl_stt1, wl_sot1, wl_stt2, wl_sot2} = '0;
  endtask

  initial begin
    {wl_stt1, wl_sot1, wl_stt2, wl_sot2, c} = '0;
    for (int p = -1; p <= 1; p++)
      for (int q = -1; q <= 1; q++)
        for (int x = 0; x < 2; x++) begin   // value of the don't-care bit for 0
          logic p1, p2, q1, q2;
          int prod, got;
          p2 = (p != 0); p1 = (p == 0) ? x[0] : (p > 0);
          q2 = (q != 0); q1 = (q == 0) ? x[0] : (q > 0);
          wr(1, 1'b1, p1);      // memory mode: write P1
          wr(1, ~q1, ~p1);      // LiM: A = ~Q1, C = ~P1
          wr(2, 1'b1, p2);      // memory mode: write P2
          wr(2, ~q2, 1'b0);     // LiM: A = ~Q2, C = 0
          prod = p * q;
          got = b2 ? (b1 ? 1 : -1) : 0;
          checks++;
          if (got != prod) begin
            failures++;
            $display("FAIL P=%0d Q=%0d x=%0d: got %0d (b1=%0d b2=%0d)", p, q, x, got, b1, b2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
