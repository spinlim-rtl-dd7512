// tb_pooling_unit: sends random values, in windows of four with gaps, and
// checks that one maximum comes out per window, one cycle after its last
// value; then checks pass-through in bypass mode.
module tb_pooling_unit;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, bypass, in_valid, out_valid;
  logic signed [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int expq [$];

  pooling_unit #(.W(W), .WIN(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output %0d", out_data);
      end else begin
        int e;
        e = expq.pop_front();
        if (int'(out_data) != e) begin failures++; $display("FAIL got %0d want %0d", out_data, e); end
      end
    end
  end

  initial begin
    int nwin;
    clear = 0; bypass = 0; in_valid = 0; in_data = '0;
    #12 rst_n = 1'b1;
    clear = 1; @(posedge clk); #1; clear = 0;
    nwin = 0;
    for (int w = 0; w < 40; w++) begin
      int mx;
      mx = -100000;
      for (int k = 0; k < 4; k++) begin
        int v;
        v = int'($urandom_range(0, 400)) - 200;
        if (v > mx) mx = v;
        in_valid = 1; in_data = W'(v);
        if (k == 3) expq.push_back(mx);
        @(posedge clk); #1;
        in_valid = 0;
        if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      end
      nwin++;
    end
    bypass = 1;
    for (int k = 0; k < 20; k++) begin
      int v;
      v = int'($urandom_range(0, 400)) - 200;
      in_valid = 1; in_data = W'(v);
      expq.push_back(v);
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
