// tb_counter_unit: feeds random read-out rows into the counters and checks
// every column sum against integer sums kept by the testbench, then clear.
module tb_counter_unit;
  localparam int COLS = 16, ACC_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, acc;
  logic [COLS-1:0] in1, in2;
  logic [3:0] rd_sel;
  logic signed [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int sums [COLS];

  counter_unit #(.COLS(COLS), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int c = 0; c < COLS; c++) begin
      rd_sel = 4'(c); #1;
      checks++;
      if (int'(rd_data) != sums[c]) begin
        failures++;
        $display("FAIL column %0d got %0d want %0d", c, rd_data, sums[c]);
      end
    end
  endtask

  initial begin
    clear = 0; acc = 0; in1 = '0; in2 = '0; rd_sel = '0;
    foreach (sums[c]) sums[c] = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      in1 = COLS'($urandom); in2 = COLS'($urandom);
      acc = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (acc) for (int c = 0; c < COLS; c++) sums[c] += in2[c] ? (in1[c] ? 1 : -1) : 0;
      acc = 0;
    end
    compare();
    clear = 1; @(posedge clk); #1; clear = 0;
    foreach (sums[c]) sums[c] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
