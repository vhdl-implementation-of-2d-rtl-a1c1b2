// dma_engine: moves data between main memory, the row kernel, the column
// engine, the boundary buffers and the link to the previous stripe processor.
//
// A transfer is started by cmd_valid with a dma_cmd_t while idle (cmd_ready),
// and done pulses for one clock when it has completed.
//   DMA_ROW_LOAD  reads elements k0..k1-1 of a row from main memory into the
//                 kernel load port (element k at kernel index k); one word per
//                 clock, done k1-k0+2 clocks after acceptance.
//   DMA_ROW_FEED  streams row-kernel samples k0..k1-1 to the column engine
//                 over feed_valid/feed_ready (cascade of row and column
//                 filtering: the row-transformed line does not go back to
//                 main memory); with tx_copy each word is also written to
//                 line tx_line of the outgoing boundary buffer.
//   DMA_RX_FEED   streams the OVL x width words of the incoming boundary
//                 buffer, line by line, to the column engine.
//   DMA_SEND      streams the OVL x width words of the outgoing buffer, line
//                 by line, over the valid/ready link to the previous block.
// Main memory and the boundary buffers have a one-clock read latency; the
// kernel read port is asynchronous. The two buffer streams take two clocks
// per word plus stalls. The address of sample (r, c) of level j is
// (r << j) * N + (c << j): every level works in place, in the same array, on
// every 2^j-th row and column. The DMA only reads main memory; results are
// written by the column engine.
// The DMA block and its place between main memory, the boundary buffers and
// the kernels follow the design; its command set and timing are this
// implementation's own.
module dma_engine
  import dwt_pkg::*;
#(
  parameter int N        = 512,           // image width and height
  parameter int KAW      = 9,             // kernel index width
  parameter int LINE_LEN = N,             // boundary buffer line length
  localparam int MAW     = 2 * $clog2(N), // main memory address width
  localparam int LOGN    = $clog2(N),
  localparam int LNW     = $clog2(OVL),
  localparam int CW      = $clog2(LINE_LEN)
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            cmd_valid,
  input  dma_cmd_t        cmd,
  output logic            cmd_ready,
  output logic            done,
  // main memory (read side)
  output logic            mem_en,
  output logic [MAW-1:0]  mem_addr,
  input  data_t           mem_rdata,
  // row kernel
  output logic            k_ld_en,
  output logic [KAW-1:0]  k_ld_idx,
  output data_t           k_ld_data,
  output logic [KAW-1:0]  k_rd_idx,
  input  data_t           k_rd_data,
  // column engine input
  output logic            feed_valid,
  output data_t           feed_data,
  input  logic            feed_ready,
  // outgoing boundary buffer
  output logic            tx_we,
  output logic [LNW-1:0]  tx_wline,
  output logic [CW-1:0]   tx_wcol,
  output data_t           tx_wdata,
  output logic            tx_re,
  output logic [LNW-1:0]  tx_rline,
  output logic [CW-1:0]   tx_rcol,
  input  data_t           tx_rdata,
  // incoming boundary buffer (read side)
  output logic            rx_re,
  output logic [LNW-1:0]  rx_rline,
  output logic [CW-1:0]   rx_rcol,
  input  data_t           rx_rdata,
  // link to the previous block
  output logic            lnk_valid,
  output data_t           lnk_data,
  input  logic            lnk_ready
);

  typedef enum logic [2:0] {D_IDLE, D_LOAD, D_DRAIN, D_FEED, D_BUF_RD, D_BUF_OUT} dstate_e;

  dstate_e     state_q;
  dma_cmd_t    cmd_q;
  logic [15:0] k_q;
  logic [15:0] line_q, col_q;     // buffer stream position
  // load pipeline (read issued, data next clock)
  logic           v1_q;
  logic [KAW-1:0] k1_q;

  logic from_rx, last_k, buf_take;
  assign from_rx = (cmd_q.op == DMA_RX_FEED);
  assign last_k  = (k_q + 16'd1 >= cmd_q.k1);

  always_comb begin
    mem_en     = (state_q == D_LOAD);
    mem_addr   = (MAW'(cmd_q.fixed) << (MAW'(cmd_q.level) + MAW'(LOGN))) + (MAW'(k_q) << cmd_q.level);
    k_ld_en    = v1_q;
    k_ld_idx   = k1_q;
    k_ld_data  = mem_rdata;
    k_rd_idx   = KAW'(k_q);
    tx_we      = (state_q == D_FEED) && feed_ready && cmd_q.tx_copy;
    tx_wline   = LNW'(cmd_q.tx_line);
    tx_wcol    = CW'(k_q);
    tx_wdata   = k_rd_data;
    tx_re      = (state_q == D_BUF_RD) && !from_rx;
    tx_rline   = LNW'(line_q);
    tx_rcol    = CW'(col_q);
    rx_re      = (state_q == D_BUF_RD) && from_rx;
    rx_rline   = LNW'(line_q);
    rx_rcol    = CW'(col_q);
    lnk_valid  = (state_q == D_BUF_OUT) && !from_rx;
    lnk_data   = tx_rdata;
    feed_valid = (state_q == D_FEED) || ((state_q == D_BUF_OUT) && from_rx);
    feed_data  = (state_q == D_FEED) ? k_rd_data : rx_rdata;
  end

  assign buf_take  = from_rx ? feed_ready : lnk_ready;
  assign cmd_ready = (state_q == D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= D_IDLE;
      cmd_q   <= '0;
      k_q     <= '0;
      line_q  <= '0;
      col_q   <= '0;
      v1_q    <= 1'b0;
      k1_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      v1_q <= 1'b0;
      case (state_q)
        D_IDLE: if (cmd_valid) begin
          cmd_q  <= cmd;
          k_q    <= cmd.k0;
          line_q <= '0;
          col_q  <= '0;
          case (cmd.op)
            DMA_ROW_LOAD: state_q <= D_LOAD;
            DMA_ROW_FEED: state_q <= D_FEED;
            default:      state_q <= D_BUF_RD;
          endcase
        end
        D_LOAD: begin
          v1_q  <= 1'b1;
          k1_q  <= KAW'(k_q);
          k_q   <= k_q + 16'd1;
          if (last_k) state_q <= D_DRAIN;
        end
        D_DRAIN: begin      // last loaded word is written to the kernel now
          state_q <= D_IDLE;
          done    <= 1'b1;
        end
        D_FEED: if (feed_ready) begin
          k_q <= k_q + 16'd1;
          if (last_k) begin
            state_q <= D_IDLE;
            done    <= 1'b1;
          end
        end
        D_BUF_RD: state_q <= D_BUF_OUT;
        D_BUF_OUT: if (buf_take) begin
          if (col_q + 16'd1 >= cmd_q.width) begin
            col_q <= '0;
            if (line_q + 16'd1 >= 16'(OVL)) begin
              state_q <= D_IDLE;
              done    <= 1'b1;
            end else begin
              line_q  <= line_q + 16'd1;
              state_q <= D_BUF_RD;
            end
          end else begin
            col_q   <= col_q + 16'd1;
            state_q <= D_BUF_RD;
          end
        end
        default: state_q <= D_IDLE;
      endcase
    end
  end

  // A word offered on the link stays offered, unchanged, until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (lnk_valid && !lnk_ready) |=> (lnk_valid && $stable(lnk_data)));
  // Commands are only accepted while idle
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid |-> cmd_ready);

endmodule
