// spinlim_top: one SpinLiM unit, a ternary neural network layer engine
// built around a stateful logic-in-memory array of STT-SOT MRAM cells.
//
// Blocks: weight_memory (the typical memory array holding the weights),
// global_buffer (input activations), mapping_control (the digital
// sequencer), array_buffer (operand P in front of the write drivers),
// spinlim_array (the computing array, which multiplies a whole row of
// ternary values by one ternary value with four writes), counter_unit (the
// column sums) and pooling_unit (2x2 max pooling or pass-through).
//
// While busy is low the computing array can also be used as a typical
// memory through the mem_* port: mem_we writes mem_wdata into cell row
// mem_t (0 = cell-1, 1 = cell-2) of row group mem_addr, mem_re reads both
// cell rows of a group onto mem_rdata1/mem_rdata2 one cycle later. This
// also lets the host look at the products a layer left in the array. The
// port is ignored while a layer runs.
//
// Use: load weights through wm_* and activations through gb_* while busy is
// low, set the layer configuration (see mapping_control) and pulse start.
// The layer's outputs come out on res_valid/res_data, numbered by res_idx
// from 0, and done pulses after the last one. Results are the signed column
// sums (or their pooled maxima); turning them into ternary activations for
// the next layer is left to the host, as the document does not describe it.
module spinlim_top
  import spinlim_pkg::*;
#(
  parameter int unsigned COLS     = 128,
  parameter int unsigned GROUPS   = 128,
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned WM_DEPTH = 1024,
  parameter int unsigned GB_DEPTH = 4096,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned AW  = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned WAW = (WM_DEPTH > 1) ? $clog2(WM_DEPTH) : 1,
  localparam int unsigned GAW = (GB_DEPTH > 1) ? $clog2(GB_DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // weight loading
  input  logic                    wm_we,
  input  logic [WAW-1:0]          wm_waddr,
  input  trit_t [COLS-1:0]        wm_wdata,
  // activation loading
  input  logic                    gb_we,
  input  logic [GAW-1:0]          gb_waddr,
  input  trit_t                   gb_wdata,
  // layer configuration and control
  input  logic                    start,
  input  layer_mode_e             mode,
  input  logic [15:0]             n_rows,
  input  logic [CW:0]             n_cols,
  input  logic [7:0]              in_w,
  input  logic [7:0]              in_h,
  input  logic [7:0]              k_size,
  input  logic [7:0]              out_w,
  input  logic [7:0]              out_h,
  input  logic [WAW-1:0]          w_base,
  input  logic [GAW-1:0]          x_base,
  input  logic                    pool_en,
  output logic                    busy,
  output logic                    done,
  // typical-memory access to the computing array (while not busy)
  input  logic                    mem_we,
  input  logic                    mem_re,
  input  logic [AW-1:0]           mem_addr,
  input  logic                    mem_t,
  input  logic [COLS-1:0]         mem_wdata,
  output logic [COLS-1:0]         mem_rdata1,
  output logic [COLS-1:0]         mem_rdata2,
  // results
  output logic                    res_valid,
  output logic signed [ACC_W-1:0] res_data,
  output logic [15:0]             res_idx
);

  logic             wm_re;
  logic [WAW-1:0]   wm_raddr;
  trit_t [COLS-1:0] wm_rdata;
  logic             gb_re;
  logic [GAW-1:0]   gb_raddr;
  trit_t            gb_rdata;

  logic             buf_clear, buf_load, buf_wr;
  logic [COLS-1:0]  buf_load_keep;
  logic [CW-1:0]    buf_wr_idx;
  trit_t            buf_wr_data;
  logic [COLS-1:0]  c1, c2;

  logic [AW-1:0]    arr_addr;
  logic             arr_lim, arr_t, arr_q, arr_clk_sot, arr_rd_en;
  logic             host;                 // array owned by the mem_* port
  logic [AW-1:0]    a_addr;
  logic             a_lim, a_t, a_q, a_clk_sot, a_rd_en;
  logic [COLS-1:0]  a_c1, a_c2;
  logic [COLS-1:0]  out1, out2;

  logic             cnt_clear, cnt_acc;
  logic [CW-1:0]    cnt_rd_sel;
  logic signed [ACC_W-1:0] cnt_rd_data;
  logic             pool_clear, pool_bypass, pool_in_valid;

  weight_memory #(.COLS(COLS), .DEPTH(WM_DEPTH)) u_wmem (
    .clk, .we(wm_we), .waddr(wm_waddr), .wdata(wm_wdata),
    .re(wm_re), .raddr(wm_raddr), .rdata(wm_rdata)
  );

  global_buffer #(.DEPTH(GB_DEPTH)) u_gbuf (
    .clk, .we(gb_we), .waddr(gb_waddr), .wdata(gb_wdata),
    .re(gb_re), .raddr(gb_raddr), .rdata(gb_rdata)
  );

  mapping_control #(
    .COLS(COLS), .GROUPS(GROUPS), .WM_DEPTH(WM_DEPTH), .GB_DEPTH(GB_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .mode, .n_rows, .n_cols, .in_w, .in_h, .k_size, .out_w, .out_h,
    .w_base, .x_base, .pool_en, .busy, .done,
    .wm_re, .wm_raddr, .wm_rdata,
    .gb_re, .gb_raddr, .gb_rdata,
    .buf_clear, .buf_load, .buf_load_keep, .buf_wr, .buf_wr_idx, .buf_wr_data,
    .arr_addr, .arr_lim, .arr_t, .arr_q, .arr_clk_sot, .arr_rd_en,
    .cnt_clear, .cnt_acc, .cnt_rd_sel,
    .pool_clear, .pool_bypass, .pool_in_valid
  );

  array_buffer #(.COLS(COLS)) u_buf (
    .clk, .rst_n,
    .clear(buf_clear), .load(buf_load), .load_data(wm_rdata), .load_keep(buf_load_keep),
    .wr(buf_wr), .wr_idx(buf_wr_idx), .wr_data(buf_wr_data),
    .c1, .c2
  );

  // Array control: the mapping control while a layer runs, otherwise the
  // typical-memory port (memory mode, L = 0; the write driver picks
  // mem_wdata for the cell row chosen by T).
  assign host = ~busy;
  always_comb begin
    if (host) begin
      a_addr    = mem_addr;
      a_lim     = 1'b0;
      a_t       = mem_t;
      a_q       = 1'b0;
      a_clk_sot = mem_we;
      a_rd_en   = mem_re & ~mem_we;
      a_c1      = mem_wdata;
      a_c2      = mem_wdata;
    end else begin
      a_addr    = arr_addr;
      a_lim     = arr_lim;
      a_t       = arr_t;
      a_q       = arr_q;
      a_clk_sot = arr_clk_sot;
      a_rd_en   = arr_rd_en;
      a_c1      = c1;
      a_c2      = c2;
    end
  end

  spinlim_array #(.COLS(COLS), .GROUPS(GROUPS)) u_array (
    .clk, .rst_n,
    .addr(a_addr), .lim(a_lim), .t_sel(a_t), .q(a_q), .clk_sot(a_clk_sot),
    .c1(a_c1), .c2(a_c2), .rd_en(a_rd_en), .out1, .out2
  );

  assign mem_rdata1 = out1;
  assign mem_rdata2 = out2;

  counter_unit #(.COLS(COLS), .ACC_W(ACC_W)) u_cnt (
    .clk, .rst_n,
    .clear(cnt_clear), .acc(cnt_acc), .in1(out1), .in2(out2),
    .rd_sel(cnt_rd_sel), .rd_data(cnt_rd_data)
  );

  pooling_unit #(.W(ACC_W), .WIN(4)) u_pool (
    .clk, .rst_n,
    .clear(pool_clear), .bypass(pool_bypass),
    .in_valid(pool_in_valid), .in_data(cnt_rd_data),
    .out_valid(res_valid), .out_data(res_data)
  );

  // Result numbering.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         res_idx <= '0;
    else if (start && !busy) res_idx <= '0;
    else if (res_valid) res_idx <= res_idx + 16'd1;
  end

endmodule
