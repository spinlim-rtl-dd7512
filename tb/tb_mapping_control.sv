// tb_mapping_control: runs the mapping control against a datapath model
// written in the testbench (memories with one cycle read latency, array
// buffer, array cells following B(i+1) = A*C + ~A*B, sense latch, counters)
// and checks the stream it sends to the pooling unit against layer outputs
// computed directly from the data:
//   FC:   out[c] = sum_r W[r][c] * X[r]
//   conv: Y[oy][ox] = sum_{d,ky,kx} X[d][oy+ky][ox+kx] * K[d][ky][kx],
//         in order, or in 2x2 windows when pooling.
// Small sizes (8 columns, 4 row groups) make every layer wrap over several
// chunks of row groups. It also checks that the four writes of a row come
// in four back-to-back cycles.
module tb_mapping_control;
  import spinlim_pkg::*;
  localparam int COLS = 8, GROUPS = 4, WM_DEPTH = 64, GB_DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, pool_en, busy, done;
  layer_mode_e mode;
  logic [15:0] n_rows;
  logic [3:0] n_cols;
  logic [7:0] in_w, in_h, k_size, out_w, out_h;
  logic [5:0] w_base;
  logic [7:0] x_base;
  logic wm_re, gb_re;
  logic [5:0] wm_raddr;
  logic [7:0] gb_raddr;
  trit_t [COLS-1:0] wm_rdata;
  trit_t gb_rdata;
  logic buf_clear, buf_load, buf_wr;
  logic [COLS-1:0] buf_load_keep;
  logic [2:0] buf_wr_idx;
  trit_t buf_wr_data;
  logic [1:0] arr_addr;
  logic arr_lim, arr_t, arr_q, arr_clk_sot, arr_rd_en;
  logic cnt_clear, cnt_acc;
  logic [2:0] cnt_rd_sel;
  logic pool_clear, pool_bypass, pool_in_valid;

  int checks = 0, failures = 0;

  mapping_control #(.COLS(COLS), .GROUPS(GROUPS), .WM_DEPTH(WM_DEPTH), .GB_DEPTH(GB_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- datapath model ----------------
  trit_t [COLS-1:0] wm [WM_DEPTH];
  trit_t gb [GB_DEPTH];
  trit_t bufm [COLS];
  logic [COLS-1:0] b1 [GROUPS], b2 [GROUPS];
  logic [COLS-1:0] o1, o2;
  int sums [COLS];
  int stream [$];
  int wseq;   // position in the W1..W4 sequence (0 = none)

  always @(posedge clk) begin
    if (wm_re) wm_rdata <= wm[wm_raddr];
    if (gb_re) gb_rdata <= gb[gb_raddr];
    if (buf_clear) foreach (bufm[c]) bufm[c] <= '0;
    else if (buf_load) foreach (bufm[c]) bufm[c] <= buf_load_keep[c] ? wm_rdata[c] : trit_t'(2'b00);
    else if (buf_wr) bufm[buf_wr_idx] <= buf_wr_data;
    if (arr_clk_sot) begin
      for (int c = 0; c < COLS; c++) begin
        if (!arr_lim && !arr_t) b1[arr_addr][c] <= bufm[c].p1;
        if (!arr_lim &&  arr_t) b2[arr_addr][c] <= bufm[c].p2;
        if ( arr_lim && !arr_t && !arr_q) b1[arr_addr][c] <= ~bufm[c].p1;
        if ( arr_lim &&  arr_t && !arr_q) b2[arr_addr][c] <= 1'b0;
      end
    end
    if (arr_rd_en) begin o1 <= b1[arr_addr]; o2 <= b2[arr_addr]; end
    if (cnt_clear) foreach (sums[c]) sums[c] <= 0;
    else if (cnt_acc) foreach (sums[c]) sums[c] <= sums[c] + (o2[c] ? (o1[c] ? 1 : -1) : 0);
    if (pool_in_valid) stream.push_back(sums[cnt_rd_sel]);
    // four writes back to back: W1 (L0,T0) W2 (L1,T0) W3 (L0,T1) W4 (L1,T1)
    if (rst_n) begin
      logic [1:0] lt;
      lt = {arr_t, arr_lim};
      if (arr_clk_sot) begin
        checks++;
        if (lt != 2'(wseq)) begin
          failures++; $display("FAIL write %0d of a row came as T,L=%b", wseq + 1, lt);
        end
        wseq = (wseq + 1) % 4;
      end else if (wseq != 0) begin
        checks++; failures++; $display("FAIL gap inside a multiplication");
        wseq = 0;
      end
    end
  end

  // ---------------- layer runs ----------------
  task automatic run_and_compare(input int want [$], input string name);
    int ncyc;
    stream.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    ncyc = 0;
    while (!done && ncyc < 200000) begin @(negedge clk); ncyc++; end
    checks++;
    if (stream.size() != want.size()) begin
      failures++; $display("FAIL %s: %0d results, want %0d", name, stream.size(), want.size());
    end else begin
      for (int i = 0; i < want.size(); i++) begin
        checks++;
        if (stream[i] != want[i]) begin
          failures++; $display("FAIL %s result %0d: got %0d want %0d", name, i, stream[i], want[i]);
        end
      end
    end
  endtask

  function automatic int rnd_t();
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  initial begin
    int want [$];
    start = 0; mode = MODE_FC; n_rows = '0; n_cols = '0; in_w = '0; in_h = '0;
    k_size = '0; out_w = '0; out_h = '0; w_base = '0; x_base = '0; pool_en = 0;
    wseq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- fully connected: 11 inputs, 7 outputs, weights at word 3, inputs at 20
    begin
      int wv [11][COLS], xv [11];
      for (int r = 0; r < 11; r++) begin
        xv[r] = rnd_t(); gb[20 + r] = trit_from_int(xv[r]);
        for (int c = 0; c < COLS; c++) begin
          wv[r][c] = rnd_t(); wm[3 + r][c] = trit_from_int(wv[r][c]);
        end
      end
      want.delete();
      for (int c = 0; c < 7; c++) begin
        int s; s = 0;
        for (int r = 0; r < 11; r++) s += wv[r][c] * xv[r];
        want.push_back(s);
      end
      mode = MODE_FC; n_rows = 11; n_cols = 7; w_base = 3; x_base = 20; pool_en = 1;
      run_and_compare(want, "fc");
    end

    // ---- convolution: 6x4 input, 2 channels, 3x3 kernel -> 4x2 output
    begin
      int xv [2][4][6], kv [18], y [2][4];
      for (int d = 0; d < 2; d++) for (int yy = 0; yy < 4; yy++) for (int xx = 0; xx < 6; xx++) begin
        xv[d][yy][xx] = rnd_t(); gb[40 + d * 24 + yy * 6 + xx] = trit_from_int(xv[d][yy][xx]);
      end
      for (int r = 0; r < 18; r++) begin
        kv[r] = rnd_t(); wm[10 + r / COLS][r % COLS] = trit_from_int(kv[r]);
      end
      for (int oy = 0; oy < 2; oy++) for (int ox = 0; ox < 4; ox++) begin
        y[oy][ox] = 0;
        for (int d = 0; d < 2; d++) for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++)
          y[oy][ox] += xv[d][oy + ky][ox + kx] * kv[d * 9 + ky * 3 + kx];
      end
      mode = MODE_CONV; n_rows = 18; n_cols = 8; in_w = 6; in_h = 4; k_size = 3;
      out_w = 4; out_h = 2; w_base = 10; x_base = 40;
      pool_en = 0;
      want.delete();
      for (int oy = 0; oy < 2; oy++) for (int ox = 0; ox < 4; ox++) want.push_back(y[oy][ox]);
      run_and_compare(want, "conv");
      pool_en = 1;
      want.delete();
      for (int px = 0; px < 2; px++)
        for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
          want.push_back(y[dy][2 * px + dx]);
      run_and_compare(want, "conv-pool-stream");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
