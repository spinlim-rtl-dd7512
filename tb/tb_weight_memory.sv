// tb_weight_memory: writes random words and reads them back with the one
// cycle read latency.
module tb_weight_memory;
  import spinlim_pkg::*;
  localparam int COLS = 8, DEPTH = 64;
  logic clk = 1'b0;
  logic we, re;
  logic [5:0] waddr, raddr;
  trit_t [COLS-1:0] wdata, rdata;
  trit_t [COLS-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_memory #(.COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      for (int c = 0; c < COLS; c++) wdata[c] = trit_from_int(int'($urandom_range(0, 2)) - 1);
      model[a] = wdata; waddr = 6'(a); we = 1;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 100; n++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      raddr = 6'(a); re = 1;
      @(posedge clk); #1; re = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL address %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
