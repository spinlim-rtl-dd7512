// tb_spinlim_top: end-to-end test of the SpinLiM unit at its default size
// (128 columns, 128 row groups). Loads weights and activations through the
// load ports and runs three layers, comparing every result with values
// computed directly from the data:
//   1. fully connected, 150 inputs -> 100 outputs (150 rows: two chunks)
//   2. convolution 6x6x16 input, 3x3x16 kernel (144 rows: two chunks),
//      4x4 output, 2x2 max pooling -> 4 results
//   3. convolution 10x10x2 input, 3x3x2 kernel, 8x8 output, no pooling
// Before the layers it uses the array as a typical memory (write every
// cell row of every group, read them back); after the last layer it reads
// one row group through the same port and checks the products left there.
// It counts how often each mechanism occurred (memory-mode writes, XNOR
// and AND logic writes, row read-outs, chunk wrap-around, column gathers,
// parallel weight loads, pooled and pass-through results) and fails any
// that never did; it also checks that each parallel multiplication takes
// four cycles.
module tb_spinlim_top;
  import spinlim_pkg::*;
  localparam int COLS = 128, WM_DEPTH = 1024, GB_DEPTH = 4096, ACC_W = 16;

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
  logic signed [ACC_W-1:0] res_data;

  int checks = 0, failures = 0;

  spinlim_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_memwr = 0, n_xnor = 0, n_and = 0, n_read = 0, n_wrap = 0;
  int n_hostwr = 0, n_hostrd = 0;
  int n_gather = 0, n_load = 0, n_pooled = 0, n_bypass = 0, n_badlat = 0, n_mul = 0;
  int w1_cycle = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.arr_clk_sot && !dut.arr_lim) n_memwr++;
    if (dut.arr_clk_sot && dut.arr_lim && !dut.arr_t) n_xnor++;
    if (dut.arr_clk_sot && dut.arr_lim && dut.arr_t) n_and++;
    if (dut.arr_rd_en) n_read++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_READ_LAST && dut.u_ctrl.r_q != dut.u_ctrl.n_rows_q) n_wrap++;
    if (dut.buf_wr) n_gather++;
    if (dut.buf_load) n_load++;
    if (dut.pool_in_valid && dut.pool_bypass) n_bypass++;
    if (res_valid && !dut.pool_bypass) n_pooled++;
    // latency of one parallel multiplication: W1 .. W4 inclusive
    if (dut.arr_clk_sot && !dut.arr_lim && !dut.arr_t) w1_cycle = cyc;
    if (dut.arr_clk_sot && dut.arr_lim && dut.arr_t) begin
      n_mul++;
      if (cyc - w1_cycle + 1 != 4) n_badlat++;
    end
  end

  // ---------------- result collection ----------------
  int got [$];
  always @(posedge clk) begin
    if (res_valid) begin
      if (int'(res_idx) != got.size()) begin
        failures++; $display("FAIL result index %0d, expected %0d", res_idx, got.size());
      end
      got.push_back(int'(res_data));
    end
  end

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
    while (!done && n < 500000) begin @(negedge clk); n++; end
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
    $display("%s: %0d results, %0d cycles", name, got.size(), n);
  endtask

  // kernel values stored as a flat list, COLS per weight-memory word
  task automatic load_kernel(input int base, input int kv [$]);
    trit_t [COLS-1:0] w;
    for (int word = 0; word * COLS < kv.size(); word++) begin
      w = '0;
      for (int c = 0; c < COLS && word * COLS + c < kv.size(); c++) w[c] = trit_from_int(kv[word * COLS + c]);
      wm_write(base + word, w);
    end
  endtask

  initial begin
    int want [$];
    mem_we = 0; mem_re = 0; mem_t = 0; mem_addr = '0; mem_wdata = '0;
    wm_we = 0; gb_we = 0; start = 0; pool_en = 0; wm_waddr = '0; gb_waddr = '0;
    wm_wdata = '0; gb_wdata = '0; mode = MODE_FC; n_rows = '0; n_cols = '0;
    in_w = '0; in_h = '0; k_size = '0; out_w = '0; out_h = '0; w_base = '0; x_base = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 0. typical memory mode through the mem_* port
    begin
      logic [COLS-1:0] m [128][2];
      for (int g = 0; g < 128; g++) for (int t = 0; t < 2; t++) begin
        for (int w = 0; w < COLS / 32; w++) m[g][t][w * 32 +: 32] = $urandom;
        @(negedge clk); mem_we = 1; mem_addr = 7'(g); mem_t = t[0]; mem_wdata = m[g][t];
        @(negedge clk); mem_we = 0;
        n_hostwr++;
      end
      for (int g = 0; g < 128; g++) begin
        @(negedge clk); mem_re = 1; mem_addr = 7'(g);
        @(negedge clk); mem_re = 0;
        n_hostrd++;
        checks++;
        if (mem_rdata1 !== m[g][0] || mem_rdata2 !== m[g][1]) begin
          failures++; $display("FAIL typical-memory readback of group %0d", g);
        end
      end
    end

    // ---- 1. fully connected 150 -> 100
    begin
      int wv [150][100], xv [150];
      trit_t [COLS-1:0] w;
      for (int r = 0; r < 150; r++) begin
        w = '0;
        for (int c = 0; c < COLS; c++) begin
          int v;
          v = rnd_t();
          if (c < 100) wv[r][c] = v;
          w[c] = trit_from_int(v);   // columns beyond n_cols hold data too
        end
        wm_write(r, w);
        xv[r] = rnd_t();
        gb_write(r, xv[r]);
      end
      want.delete();
      for (int c = 0; c < 100; c++) begin
        int s; s = 0;
        for (int r = 0; r < 150; r++) s += wv[r][c] * xv[r];
        want.push_back(s);
      end
      mode = MODE_FC; n_rows = 150; n_cols = 100; w_base = 0; x_base = 0; pool_en = 0;
      run_and_compare(want, "fc 150x100");
    end

    // ---- 2. convolution 6x6x16, 3x3 kernel, 2x2 max pooling
    begin
      int xv [16][6][6], kq [$], y [4][4];
      for (int d = 0; d < 16; d++) for (int yy = 0; yy < 6; yy++) for (int xx = 0; xx < 6; xx++) begin
        xv[d][yy][xx] = rnd_t();
        gb_write(200 + d * 36 + yy * 6 + xx, xv[d][yy][xx]);
      end
      kq.delete();
      for (int r = 0; r < 144; r++) kq.push_back(rnd_t());
      load_kernel(300, kq);
      for (int oy = 0; oy < 4; oy++) for (int ox = 0; ox < 4; ox++) begin
        y[oy][ox] = 0;
        for (int d = 0; d < 16; d++) for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++)
          y[oy][ox] += xv[d][oy + ky][ox + kx] * kq[d * 9 + ky * 3 + kx];
      end
      want.delete();
      for (int py = 0; py < 2; py++) for (int px = 0; px < 2; px++) begin
        int m; m = -1000;
        for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
          if (y[2 * py + dy][2 * px + dx] > m) m = y[2 * py + dy][2 * px + dx];
        want.push_back(m);
      end
      mode = MODE_CONV; n_rows = 144; n_cols = 16; in_w = 6; in_h = 6; k_size = 3;
      out_w = 4; out_h = 4; w_base = 300; x_base = 200; pool_en = 1;
      run_and_compare(want, "conv 6x6x16 + pool");
    end

    // ---- 3. convolution 10x10x2, 3x3 kernel, no pooling
    begin
      int xv [2][10][10], kq [$];
      for (int d = 0; d < 2; d++) for (int yy = 0; yy < 10; yy++) for (int xx = 0; xx < 10; xx++) begin
        xv[d][yy][xx] = rnd_t();
        gb_write(1000 + d * 100 + yy * 10 + xx, xv[d][yy][xx]);
      end
      kq.delete();
      for (int r = 0; r < 18; r++) kq.push_back(rnd_t());
      load_kernel(310, kq);
      want.delete();
      for (int oy = 0; oy < 8; oy++) for (int ox = 0; ox < 8; ox++) begin
        int s; s = 0;
        for (int d = 0; d < 2; d++) for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++)
          s += xv[d][oy + ky][ox + kx] * kq[d * 9 + ky * 3 + kx];
        want.push_back(s);
      end
      mode = MODE_CONV; n_rows = 18; n_cols = 64; in_w = 10; in_h = 10; k_size = 3;
      out_w = 8; out_h = 8; w_base = 310; x_base = 1000; pool_en = 0;
      run_and_compare(want, "conv 10x10x2");
      // row 5 = (d 0, ky 1, kx 2) is still in row group 5: read its products
      @(negedge clk); mem_re = 1; mem_addr = 7'd5;
      @(negedge clk); mem_re = 0;
      n_hostrd++;
      for (int c = 0; c < COLS; c++) begin
        int p, prod, gotv;
        p = (c < 64) ? xv[0][c / 8 + 1][c % 8 + 2] : 0;
        prod = p * kq[5];
        gotv = mem_rdata2[c] ? (mem_rdata1[c] ? 1 : -1) : 0;
        checks++;
        if (gotv != prod) begin
          failures++; $display("FAIL product left in group 5, column %0d: got %0d want %0d", c, gotv, prod);
        end
      end
    end

    // ---- mechanisms
    $display("memory-mode writes %0d, XNOR writes %0d, AND writes %0d, reads %0d, chunk wraps %0d",
             n_memwr, n_xnor, n_and, n_read, n_wrap);
    $display("gathered columns %0d, parallel loads %0d, pooled results %0d, pass-through %0d",
             n_gather, n_load, n_pooled, n_bypass);
    $display("typical-memory writes %0d, reads %0d", n_hostwr, n_hostrd);
    checks++; if (n_hostwr == 0) begin failures++; $display("FAIL no typical-memory write"); end
    checks++; if (n_hostrd == 0) begin failures++; $display("FAIL no typical-memory read"); end
    checks++; if (n_memwr == 0)  begin failures++; $display("FAIL no memory-mode write"); end
    checks++; if (n_xnor == 0)   begin failures++; $display("FAIL no XNOR write"); end
    checks++; if (n_and == 0)    begin failures++; $display("FAIL no AND write"); end
    checks++; if (n_read == 0)   begin failures++; $display("FAIL no read-out"); end
    checks++; if (n_wrap == 0)   begin failures++; $display("FAIL no chunk wrap"); end
    checks++; if (n_gather == 0) begin failures++; $display("FAIL no column gather"); end
    checks++; if (n_load == 0)   begin failures++; $display("FAIL no parallel load"); end
    checks++; if (n_pooled == 0) begin failures++; $display("FAIL no pooled result"); end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL no pass-through result"); end
    checks++; if (n_mul != 150 + 144 + 18) begin failures++; $display("FAIL %0d multiplications", n_mul); end
    checks++; if (n_badlat != 0) begin failures++; $display("FAIL %0d multiplications not 4 cycles", n_badlat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
