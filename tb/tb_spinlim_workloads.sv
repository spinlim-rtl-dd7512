// tb_spinlim_workloads: runs slices of the two evaluated networks on the
// unit at its default size and checks every result against a direct
// computation.
//   MNIST 784-500-300-200-10: one 128-output tile of the first layer
//     (784 rows, seven chunks of row groups) and the whole last layer
//     (200 -> 10).
//   CIFAR-10 first convolution (32x32x3 input, 28x28 output, so a 5x5x3
//     kernel): one tile of four output rows (4 x 28 = 112 columns, 75
//     rows) starting at output row 8, with 2x2 max pooling -> 2 x 14
//     results. The tile is selected by pointing x_base at input row 8.
// Random ternary data; the network weights themselves are not needed to
// exercise the arithmetic.
module tb_spinlim_workloads;
  import spinlim_pkg::*;
  localparam int COLS = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wm_we, gb_we, start, pool_en, busy, done, res_valid;
  logic [9:0] wm_waddr, w_base;
  logic [11:0] gb_waddr, x_base;
  trit_t [COLS-1:0] wm_wdata;
  trit_t gb_wdata;
  layer_mode_e mode;
  logic [15:0] n_rows, res_idx;
  logic [7:0] n_cols;
  logic [7:0] in_w, in_h, k_size, out_w, out_h;
  logic mem_we, mem_re, mem_t;
  logic [6:0] mem_addr;
  logic [COLS-1:0] mem_wdata, mem_rdata1, mem_rdata2;
  logic signed [15:0] res_data;

  int checks = 0, failures = 0;

  spinlim_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [$];
  always @(posedge clk) if (res_valid) got.push_back(int'(res_data));

  function automatic int rnd_t();
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  task automatic wm_write(input int a, input trit_t [COLS-1:0] d);
    @(negedge clk); wm_we = 1; wm_waddr = 10'(a); wm_wdata = d;
    @(negedge clk); wm_we = 0;
  endtask

  task automatic gb_write(input int a, input int v);
    @(negedge clk); gb_we = 1; gb_waddr = 12'(a); gb_wdata = trit_from_int(v);
    @(negedge clk); gb_we = 0;
  endtask

  task automatic run_and_compare(input int want [$], input string name);
    int n;
    got.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0;
    while (!done && n < 2000000) begin @(negedge clk); n++; end
    repeat (2) @(negedge clk);
    checks++;
    if (got.size() != want.size()) begin
      failures++; $display("FAIL %s: %0d results, want %0d", name, got.size(), want.size());
    end else begin
      for (int i = 0; i < want.size(); i++) begin
        checks++;
        if (got[i] != want[i]) begin
          failures++; $display("FAIL %s result %0d: got %0d want %0d", name, i, got[i], want[i]);
        end
      end
    end
    $display("%s: %0d results in %0d cycles", name, got.size(), n);
  endtask

  // FC layer with ni inputs and no outputs (<= 128)
  task automatic fc_layer(input int ni, input int no, input string name);
    int wv [][], xv [], want [$];
    trit_t [COLS-1:0] w;
    wv = new[ni];
    xv = new[ni];
    for (int r = 0; r < ni; r++) begin
      wv[r] = new[COLS];
      w = '0;
      for (int c = 0; c < no; c++) begin wv[r][c] = rnd_t(); w[c] = trit_from_int(wv[r][c]); end
      wm_write(r, w);
      xv[r] = rnd_t();
      gb_write(r, xv[r]);
    end
    for (int c = 0; c < no; c++) begin
      int s; s = 0;
      for (int r = 0; r < ni; r++) s += wv[r][c] * xv[r];
      want.push_back(s);
    end
    mode = MODE_FC; n_rows = 16'(ni); n_cols = 8'(no); w_base = 0; x_base = 0; pool_en = 0;
    run_and_compare(want, name);
  endtask

  initial begin
    mem_we = 0; mem_re = 0; mem_t = 0; mem_addr = '0; mem_wdata = '0;
    wm_we = 0; gb_we = 0; start = 0; pool_en = 0; wm_waddr = '0; gb_waddr = '0;
    wm_wdata = '0; gb_wdata = '0; mode = MODE_FC; n_rows = '0; n_cols = '0;
    in_w = '0; in_h = '0; k_size = '0; out_w = '0; out_h = '0; w_base = '0; x_base = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    fc_layer(784, 128, "MNIST layer 1, outputs 0-127");
    fc_layer(200, 10, "MNIST layer 4");

    // CIFAR-10 first convolution, output rows 8..11
    begin
      int xv [3][32][32], kq [75], y [4][28], want [$];
      trit_t [COLS-1:0] w;
      for (int d = 0; d < 3; d++) for (int yy = 0; yy < 32; yy++) for (int xx = 0; xx < 32; xx++) begin
        xv[d][yy][xx] = rnd_t();
        gb_write(d * 1024 + yy * 32 + xx, xv[d][yy][xx]);
      end
      w = '0;
      for (int r = 0; r < 75; r++) begin kq[r] = rnd_t(); w[r] = trit_from_int(kq[r]); end
      wm_write(900, w);
      for (int oy = 0; oy < 4; oy++) for (int ox = 0; ox < 28; ox++) begin
        y[oy][ox] = 0;
        for (int d = 0; d < 3; d++) for (int ky = 0; ky < 5; ky++) for (int kx = 0; kx < 5; kx++)
          y[oy][ox] += xv[d][8 + oy + ky][ox + kx] * kq[d * 25 + ky * 5 + kx];
      end
      for (int py = 0; py < 2; py++) for (int px = 0; px < 14; px++) begin
        int m; m = -1000;
        for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
          if (y[2 * py + dy][2 * px + dx] > m) m = y[2 * py + dy][2 * px + dx];
        want.push_back(m);
      end
      mode = MODE_CONV; n_rows = 75; n_cols = 112; in_w = 32; in_h = 32; k_size = 5;
      out_w = 28; out_h = 4; w_base = 900; x_base = 12'(8 * 32); pool_en = 1;
      run_and_compare(want, "CIFAR-10 conv1, output rows 8-11, pooled");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
