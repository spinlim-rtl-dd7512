// tb_array_buffer: checks clear, masked parallel load and single-column
// writes of the array buffer against a model held in the testbench.
module tb_array_buffer;
  import spinlim_pkg::*;
  localparam int COLS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, load, wr;
  trit_t [COLS-1:0] load_data;
  logic [COLS-1:0] load_keep, c1, c2;
  logic [3:0] wr_idx;
  trit_t wr_data;
  int checks = 0, failures = 0;
  trit_t [COLS-1:0] model;

  array_buffer #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (c1[c] !== model[c].p1 || c2[c] !== model[c].p2) begin
        failures++;
        $display("FAIL %s column %0d", what, c);
      end
    end
  endtask

  initial begin
    {clear, load, wr} = '0; load_data = '0; load_keep = '0; wr_idx = '0; wr_data = '0;
    model = '0;
    #12 rst_n = 1'b1;
    for (int it = 0; it < 20; it++) begin
      load_data = {COLS{trit_t'(2'b00)}};
      for (int c = 0; c < COLS; c++) load_data[c] = trit_from_int(int'($urandom_range(0, 2)) - 1);
      load_keep = COLS'($urandom);
      load = 1; @(posedge clk); #1; load = 0;
      for (int c = 0; c < COLS; c++) model[c] = load_keep[c] ? load_data[c] : trit_t'(2'b00);
      compare("load");
      for (int k = 0; k < 4; k++) begin
        wr_idx = 4'($urandom); wr_data = trit_from_int(int'($urandom_range(0, 2)) - 1);
        wr = 1; @(posedge clk); #1; wr = 0;
        model[wr_idx] = wr_data;
      end
      compare("write");
      if (it % 5 == 4) begin
        clear = 1; @(posedge clk); #1; clear = 0;
        model = '0;
        compare("clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
