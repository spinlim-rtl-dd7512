// mapping_control: maps one TNN layer onto the SpinLiM array and runs it.
//
// Every layer is computed as  out[c] = sum over rows r of P_r[c] * Q_r,
// with one ternary operand P per column (written into the array) and one
// ternary operand Q per row (applied through the word-line driver):
//   fully connected (MODE_FC): row r = input neuron r, P_r = its weight row
//     (word w_base+r of the weight memory, one output neuron per column),
//     Q_r = input activation r (global buffer address x_base+r).
//   convolution (MODE_CONV): row r = kernel position (d, ky, kx), kx
//     fastest, P_r[c] = input pixel X[d][oy+ky][ox+kx] of output pixel
//     c = (oy, ox), ox fastest, Q_r = kernel value r (flat list starting at
//     weight-memory word w_base, COLS values per word). This is the
//     document's mapping of a KxK kernel onto K*K rows per input channel.
//
// Sequence for each row: fetch the operands (FC: one cycle, the weight word
// is loaded into the array buffer at once; convolution: the window is
// gathered from the global buffer one column per cycle), then the four
// array writes that form the ternary product in row group g:
//   W1 memory mode, T=0: write P1      W2 SpinLiM mode, T=0, Q1: XNOR
//   W3 memory mode, T=1: write P2      W4 SpinLiM mode, T=1, Q2: AND
// When all GROUPS row groups hold products, or the rows run out, the used
// groups are read one per cycle into the counters (accumulation), and the
// next chunk of rows reuses the array from group 0. At the end the column
// sums are streamed out through the pooling unit: in order (bypass) or, with
// pool_en, in 2x2 windows of the out_h x out_w output map.
//
// Chunking, the operand fetch, the read-out order and the output ordering
// are this design's choices; the document gives the row/column mapping and
// the four-write multiplication. start is taken in IDLE; done pulses for
// one cycle, the cycle after the last result leaves the pooling unit.
// buf_wr_data is the global buffer's read data passed straight through: a
// gathered pixel goes into the array buffer in the cycle it arrives.
module mapping_control
  import spinlim_pkg::*;
#(
  parameter int unsigned COLS     = 128,
  parameter int unsigned GROUPS   = 128,
  parameter int unsigned WM_DEPTH = 1024,
  parameter int unsigned GB_DEPTH = 4096,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned AW  = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned WAW = (WM_DEPTH > 1) ? $clog2(WM_DEPTH) : 1,
  localparam int unsigned GAW = (GB_DEPTH > 1) ? $clog2(GB_DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // layer configuration, sampled at start
  input  logic             start,
  input  layer_mode_e      mode,
  input  logic [15:0]      n_rows,   // FC: inputs; conv: K*K*D
  input  logic [CW:0]      n_cols,   // FC: outputs; conv: out_h*out_w
  input  logic [7:0]       in_w,     // conv input width
  input  logic [7:0]       in_h,     // conv input height
  input  logic [7:0]       k_size,   // conv kernel size K
  input  logic [7:0]       out_w,    // conv output width
  input  logic [7:0]       out_h,    // conv output height
  input  logic [WAW-1:0]   w_base,
  input  logic [GAW-1:0]   x_base,
  input  logic             pool_en,
  output logic             busy,
  output logic             done,
  // weight memory read port
  output logic             wm_re,
  output logic [WAW-1:0]   wm_raddr,
  input  trit_t [COLS-1:0] wm_rdata,
  // global buffer read port
  output logic             gb_re,
  output logic [GAW-1:0]   gb_raddr,
  input  trit_t            gb_rdata,
  // array buffer
  output logic             buf_clear,
  output logic             buf_load,
  output logic [COLS-1:0]  buf_load_keep,
  output logic             buf_wr,
  output logic [CW-1:0]    buf_wr_idx,
  output trit_t            buf_wr_data,
  // SpinLiM array
  output logic [AW-1:0]    arr_addr,
  output logic             arr_lim,
  output logic             arr_t,
  output logic             arr_q,
  output logic             arr_clk_sot,
  output logic             arr_rd_en,
  // counters and pooling
  output logic             cnt_clear,
  output logic             cnt_acc,
  output logic [CW-1:0]    cnt_rd_sel,
  output logic             pool_clear,
  output logic             pool_bypass,
  output logic             pool_in_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_LOADQ, S_GATHER,
    S_W1, S_W2, S_W3, S_W4,
    S_READ, S_READ_LAST, S_OUT, S_FINISH
  } state_e;

  state_e state_q;

  // configuration
  layer_mode_e    mode_q;
  logic [15:0]    n_rows_q;
  logic [CW:0]    n_cols_q;
  logic [7:0]     in_w_q, k_q, out_w_q, out_h_q;
  logic [15:0]    hw_q;        // in_h * in_w
  logic [WAW-1:0] w_base_q;
  logic [GAW-1:0] x_base_q;
  logic           pool_q;

  // row progress
  logic [15:0]    r_q;         // current row
  logic [AW-1:0]  g_q;         // its row group in the array
  logic [7:0]     d_q, ky_q, kx_q;   // conv: (channel, kernel row, kernel col) of r
  trit_t          q_q;         // operand Q of the current row
  // gather progress
  logic [CW-1:0]  col_q;       // column whose data arrives this cycle
  logic [7:0]     oy_q, ox_q;  // output pixel of the column requested next
  // read-out progress
  logic [AW-1:0]  rd_g_q;
  logic [AW-1:0]  last_g_q;
  // output progress
  logic [CW-1:0]  oidx_q;
  logic [7:0]     py_q, px_q;
  logic           dy_q, dx_q;

  logic           last_row;
  logic [GAW-1:0] gather_off;
  logic [CW-1:0]  q_idx;

  assign busy = (state_q != S_IDLE);
  assign last_row = (r_q + 16'd1 == n_rows_q);

  // Global-buffer offset of pixel (d, oy+ky, ox+kx) for the requested column.
  function automatic logic [15:0] pix_off(input logic [7:0] oy, input logic [7:0] ox);
    return 16'(d_q * hw_q) + 16'((16'(oy) + 16'(ky_q)) * 16'(in_w_q)) + 16'(16'(ox) + 16'(kx_q));
  endfunction

  assign gather_off = GAW'((state_q == S_FETCH) ? pix_off(8'd0, 8'd0) : pix_off(oy_q, ox_q));
  assign q_idx = CW'(r_q % COLS);

  always_comb begin
    wm_re         = 1'b0;
    wm_raddr      = '0;
    gb_re         = 1'b0;
    gb_raddr      = '0;
    buf_clear     = 1'b0;
    buf_load      = 1'b0;
    buf_wr        = 1'b0;
    buf_wr_idx    = col_q;
    buf_wr_data   = gb_rdata;
    arr_addr      = g_q;
    arr_lim       = 1'b0;
    arr_t         = 1'b0;
    arr_q         = 1'b0;
    arr_clk_sot   = 1'b0;
    arr_rd_en     = 1'b0;
    cnt_clear     = 1'b0;
    cnt_acc       = 1'b0;
    cnt_rd_sel    = oidx_q;
    pool_clear    = 1'b0;
    pool_bypass   = ~pool_q;
    pool_in_valid = 1'b0;
    for (int unsigned c = 0; c < COLS; c++) buf_load_keep[c] = ((CW + 1)'(c) < n_cols_q);

    unique case (state_q)
      S_IDLE: begin
        cnt_clear  = start;
        pool_clear = start;
      end
      S_FETCH: begin
        wm_re = 1'b1;
        gb_re = 1'b1;
        if (mode_q == MODE_FC) begin
          wm_raddr = w_base_q + WAW'(r_q);
          gb_raddr = x_base_q + GAW'(r_q);
        end else begin
          wm_raddr  = w_base_q + WAW'(r_q / COLS);
          gb_raddr  = x_base_q + gather_off;
          buf_clear = 1'b1;
        end
      end
      S_LOADQ: buf_load = 1'b1;
      S_GATHER: begin
        buf_wr = 1'b1;
        if ((CW + 1)'(col_q) + 1'b1 < n_cols_q) begin
          gb_re    = 1'b1;
          gb_raddr = x_base_q + gather_off;
        end
      end
      S_W1: begin arr_clk_sot = 1'b1; end
      S_W2: begin arr_clk_sot = 1'b1; arr_lim = 1'b1; arr_q = q_q.p1; end
      S_W3: begin arr_clk_sot = 1'b1; arr_t = 1'b1; end
      S_W4: begin arr_clk_sot = 1'b1; arr_lim = 1'b1; arr_t = 1'b1; arr_q = q_q.p2; end
      S_READ: begin
        arr_rd_en = 1'b1;
        arr_addr  = rd_g_q;
        cnt_acc   = (rd_g_q != '0);
      end
      S_READ_LAST: cnt_acc = 1'b1;
      S_OUT: begin
        pool_in_valid = 1'b1;
        if (pool_q) cnt_rd_sel = CW'((16'(py_q) * 16'd2 + 16'(dy_q)) * 16'(out_w_q) + 16'(px_q) * 16'd2 + 16'(dx_q));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      done     <= 1'b0;
      mode_q   <= MODE_FC;
      n_rows_q <= '0;
      n_cols_q <= '0;
      in_w_q   <= '0;
      k_q      <= '0;
      out_w_q  <= '0;
      out_h_q  <= '0;
      hw_q     <= '0;
      w_base_q <= '0;
      x_base_q <= '0;
      pool_q   <= 1'b0;
      r_q      <= '0;
      g_q      <= '0;
      d_q      <= '0;
      ky_q     <= '0;
      kx_q     <= '0;
      q_q      <= '0;
      col_q    <= '0;
      oy_q     <= '0;
      ox_q     <= '0;
      rd_g_q   <= '0;
      last_g_q <= '0;
      oidx_q   <= '0;
      py_q     <= '0;
      px_q     <= '0;
      dy_q     <= 1'b0;
      dx_q     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            mode_q   <= mode;
            n_rows_q <= n_rows;
            n_cols_q <= n_cols;
            in_w_q   <= in_w;
            k_q      <= k_size;
            out_w_q  <= out_w;
            out_h_q  <= out_h;
            hw_q     <= 16'(in_h * in_w);
            w_base_q <= w_base;
            x_base_q <= x_base;
            pool_q   <= pool_en && (mode == MODE_CONV);
            r_q      <= '0;
            g_q      <= '0;
            d_q      <= '0;
            ky_q     <= '0;
            kx_q     <= '0;
            state_q  <= S_FETCH;
          end
        end
        S_FETCH: begin
          col_q <= '0;
          // next column to request is column 1
          if (8'd1 == out_w_q) begin
            ox_q <= '0;
            oy_q <= 8'd1;
          end else begin
            ox_q <= 8'd1;
            oy_q <= '0;
          end
          state_q <= (mode_q == MODE_FC) ? S_LOADQ : S_GATHER;
        end
        S_LOADQ: begin
          q_q     <= gb_rdata;
          state_q <= S_W1;
        end
        S_GATHER: begin
          if (col_q == '0) q_q <= wm_rdata[q_idx];
          if ((CW + 1)'(col_q) + 1'b1 < n_cols_q) begin
            col_q <= col_q + 1'b1;
            if (ox_q + 8'd1 == out_w_q) begin
              ox_q <= '0;
              oy_q <= oy_q + 8'd1;
            end else begin
              ox_q <= ox_q + 8'd1;
            end
          end else begin
            state_q <= S_W1;
          end
        end
        S_W1: state_q <= S_W2;
        S_W2: state_q <= S_W3;
        S_W3: state_q <= S_W4;
        S_W4: begin
          r_q <= r_q + 16'd1;
          g_q <= g_q + 1'b1;
          if (kx_q + 8'd1 == k_q) begin
            kx_q <= '0;
            if (ky_q + 8'd1 == k_q) begin
              ky_q <= '0;
              d_q  <= d_q + 8'd1;
            end else begin
              ky_q <= ky_q + 8'd1;
            end
          end else begin
            kx_q <= kx_q + 8'd1;
          end
          if (last_row || g_q == AW'(GROUPS - 1)) begin
            last_g_q <= g_q;
            rd_g_q   <= '0;
            state_q  <= S_READ;
          end else begin
            state_q <= S_FETCH;
          end
        end
        S_READ: begin
          rd_g_q <= rd_g_q + 1'b1;
          if (rd_g_q == last_g_q) state_q <= S_READ_LAST;
        end
        S_READ_LAST: begin
          g_q <= '0;
          if (r_q == n_rows_q) begin
            oidx_q  <= '0;
            py_q    <= '0;
            px_q    <= '0;
            dy_q    <= 1'b0;
            dx_q    <= 1'b0;
            state_q <= S_OUT;
          end else begin
            state_q <= S_FETCH;
          end
        end
        S_OUT: begin
          if (!pool_q) begin
            oidx_q <= oidx_q + 1'b1;
            if ((CW + 1)'(oidx_q) + 1'b1 == n_cols_q) state_q <= S_FINISH;
          end else begin
            dx_q <= ~dx_q;
            if (dx_q) begin
              dy_q <= ~dy_q;
              if (dy_q) begin
                if (px_q + 8'd1 == out_w_q / 2) begin
                  px_q <= '0;
                  py_q <= py_q + 8'd1;
                  if (py_q + 8'd1 == out_h_q / 2) state_q <= S_FINISH;
                end else begin
                  px_q <= px_q + 8'd1;
                end
              end
            end
          end
        end
        S_FINISH: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A row group is either written or read in a cycle, never both.
  a_no_rw_overlap: assert property (@(posedge clk)
    !(arr_clk_sot && arr_rd_en));

endmodule
