// dwt_unit: one stripe processor of the parallel 2-D DWT. It computes J levels
// of the (9,7) wavelet transform of one horizontal stripe of an N x N image held
// in main memory, exchanging boundary rows with its neighbours so that the
// stripes together give exactly the transform of the whole image, with no
// block artefacts at the stripe borders.
//
// Inside: the scheduler (dwt_controller), the DMA engine, the row kernel
// (lifting_kernel, one whole row at a time), the column kernel (column_engine,
// line-buffered lifting down the columns, fed row by row from the row kernel),
// and the outgoing and incoming boundary buffers (boundary_buffer). A small
// receiver writes words arriving from the next block, in order, into the
// incoming buffer (line by line, each line as wide as the current level) and
// raises rx_full after OVL lines. The memory port is shared: the DMA reads
// rows for the row kernel, and the column engine writes finished coefficients
// (the two never overlap in time; the column engine has priority).
//
// Interfaces: one main-memory port (one-clock read latency, word address
// (r << j) * N + (c << j) for sample (r, c) of level j); a valid/ready link to
// the previous block (lo_*) and one from the next block (li_*); start / idle
// and the level barrier handshake (at_barrier, level_go) to the top level.
// The first block leaves lo_* unused by its neighbours, the last block gets no
// words on li_*.
// The set of blocks and the cascade of row and column kernels follow the
// design's DWT unit; how they are connected (row kernel streamed by the DMA
// into the column engine, a free-running link receiver, a shared memory port)
// and the link protocol are this implementation's choices.
module dwt_unit
  import dwt_pkg::*;
#(
  parameter int N     = 512,
  parameter int S     = 4,
  parameter int J     = 3,
  parameter int BLOCK = 0,
  localparam int MAW  = 2 * $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           idle,
  output logic           at_barrier,
  input  logic           level_go,
  // main memory
  output logic           mem_en,
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output data_t          mem_wdata,
  input  data_t          mem_rdata,
  // boundary link to the previous block
  output logic           lo_valid,
  output data_t          lo_data,
  input  logic           lo_ready,
  // boundary link from the next block
  input  logic           li_valid,
  input  data_t          li_data,
  output logic           li_ready
);

  localparam int RMAX = N;              // row kernel length / line width
  localparam int RAW  = $clog2(RMAX);
  localparam int RLW  = $clog2(RMAX + 1);
  localparam int KAW  = RAW;
  localparam int LNW  = $clog2(OVL);
  localparam int CW   = $clog2(N);
  localparam int LOGN = $clog2(N);

  // ---- controller ------------------------------------------------------------
  logic           dma_valid, dma_ready, dma_done;
  dma_cmd_t       dma_cmd;
  logic           rk_start, rk_done, rk_busy;
  logic [RLW-1:0] rk_len, ce_width;
  logic           ce_win_start, ce_flush, ce_done;
  logic [15:0]    ce_own_k0, ce_own_k1, row_base;
  logic           rx_full, rx_clear;
  logic [3:0]     level;

  dwt_controller #(.N(N), .S(S), .J(J), .BLOCK(BLOCK)) u_ctrl (
    .clk, .rst_n, .start, .idle, .at_barrier, .level_go, .level, .row_base,
    .dma_valid, .dma_cmd, .dma_ready, .dma_done,
    .rk_start, .rk_len, .rk_done,
    .ce_win_start, .ce_width, .ce_own_k0, .ce_own_k1, .ce_flush, .ce_done,
    .rx_full, .rx_clear
  );

  // ---- DMA -------------------------------------------------------------------
  logic           dma_mem_en;
  logic [MAW-1:0] dma_mem_addr;
  logic           k_ld_en;
  logic [KAW-1:0] k_ld_idx, k_rd_idx;
  data_t          k_ld_data, k_rd_data;
  logic           feed_valid, feed_ready;
  data_t          feed_data;
  logic           tx_we, tx_re, rx_re;
  logic [LNW-1:0] tx_wline, tx_rline, rx_rline;
  logic [CW-1:0]  tx_wcol, tx_rcol, rx_rcol;
  data_t          tx_wdata, tx_rdata, rx_rdata;

  dma_engine #(.N(N), .KAW(KAW), .LINE_LEN(N)) u_dma (
    .clk, .rst_n,
    .cmd_valid(dma_valid), .cmd(dma_cmd), .cmd_ready(dma_ready), .done(dma_done),
    .mem_en(dma_mem_en), .mem_addr(dma_mem_addr), .mem_rdata,
    .k_ld_en, .k_ld_idx, .k_ld_data, .k_rd_idx, .k_rd_data,
    .feed_valid, .feed_data, .feed_ready,
    .tx_we, .tx_wline, .tx_wcol, .tx_wdata, .tx_re, .tx_rline, .tx_rcol, .tx_rdata,
    .rx_re, .rx_rline, .rx_rcol, .rx_rdata,
    .lnk_valid(lo_valid), .lnk_data(lo_data), .lnk_ready(lo_ready)
  );

  // ---- row kernel and column engine ----------------------------------------------
  lifting_kernel #(.MAXLEN(RMAX)) u_row_kernel (
    .clk, .rst_n, .start(rk_start), .len(rk_len), .busy(rk_busy), .done(rk_done),
    .ld_en(k_ld_en), .ld_idx(k_ld_idx), .ld_data(k_ld_data),
    .rd_idx(k_rd_idx), .rd_data(k_rd_data)
  );

  logic          ce_out_valid;
  logic [15:0]   ce_out_row;
  logic [CW-1:0] ce_out_col;
  data_t         ce_out_data;

  column_engine #(.W_MAX(N)) u_col_engine (
    .clk, .rst_n,
    .win_start(ce_win_start), .width(ce_width), .own_k0(ce_own_k0), .own_k1(ce_own_k1),
    .flush(ce_flush), .done(ce_done),
    .in_valid(feed_valid), .in_data(feed_data), .in_ready(feed_ready),
    .out_valid(ce_out_valid), .out_row(ce_out_row), .out_col(ce_out_col), .out_data(ce_out_data)
  );

  // ---- main memory port ------------------------------------------------------------
  logic [MAW-1:0] ce_addr;
  assign ce_addr   = (MAW'(row_base + ce_out_row) << (MAW'(level) + MAW'(LOGN)))
                   + (MAW'(ce_out_col) << level);
  assign mem_en    = ce_out_valid || dma_mem_en;
  assign mem_we    = ce_out_valid;
  assign mem_addr  = ce_out_valid ? ce_addr : dma_mem_addr;
  assign mem_wdata = ce_out_data;

  // ---- boundary buffers --------------------------------------------------------
  boundary_buffer #(.LINES(OVL), .LINE_LEN(N)) u_tx_buf (
    .clk, .we(tx_we), .wline(tx_wline), .wcol(tx_wcol), .wdata(tx_wdata),
    .re(tx_re), .rline(tx_rline), .rcol(tx_rcol), .rdata(tx_rdata)
  );

  logic           rx_we;
  logic [LNW:0]   rx_line_q;
  logic [CW:0]    rx_col_q;
  logic [CW:0]    rx_width;

  assign rx_width = (CW+1)'(N) >> level;
  assign rx_full  = (rx_line_q == (LNW+1)'(OVL));
  assign li_ready = !rx_full;
  assign rx_we    = li_valid && li_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_line_q <= '0;
      rx_col_q  <= '0;
    end else if (rx_clear) begin
      rx_line_q <= '0;
      rx_col_q  <= '0;
    end else if (rx_we) begin
      if (rx_col_q + (CW+1)'(1) >= rx_width) begin
        rx_col_q  <= '0;
        rx_line_q <= rx_line_q + (LNW+1)'(1);
      end else begin
        rx_col_q <= rx_col_q + (CW+1)'(1);
      end
    end
  end

  boundary_buffer #(.LINES(OVL), .LINE_LEN(N)) u_rx_buf (
    .clk, .we(rx_we), .wline(LNW'(rx_line_q)), .wcol(CW'(rx_col_q)), .wdata(li_data),
    .re(rx_re), .rline(rx_rline), .rcol(rx_rcol), .rdata(rx_rdata)
  );

  // The row kernel is only loaded or read while idle
  assert property (@(posedge clk) disable iff (!rst_n) (k_ld_en || feed_valid) |-> !rk_busy);
  // The DMA never reads main memory while the column engine writes it
  assert property (@(posedge clk) disable iff (!rst_n) !(ce_out_valid && dma_mem_en));

endmodule
