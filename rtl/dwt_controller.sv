// dwt_controller: the scheduler of one stripe processor. It runs the J
// decomposition levels of the processor's stripe, each as:
//   1. open a column window in the column engine (width, owned rows);
//   2. for every row of the stripe: DMA-load it from main memory into the
//      row kernel, lift it, and feed the result straight into the column
//      engine (cascade of row and column filtering); the first OVL rows are
//      also copied to the outgoing boundary buffer when there is a previous
//      block, and right after row OVL-1 that buffer is sent to it;
//   3. wait until the incoming buffer holds the next block's OVL row-
//      transformed rows, feed them to the column engine, and flush it.
// The column engine writes the rows this block owns: rows OVL/2 .. R+OVL/2-1
// of its window (the first block from row 0, the last block up to its last
// row). Between levels the controller waits at a barrier (at_barrier high)
// until level_go, so that no block starts level j+1 while a neighbour still
// writes level-j results. start (while idle) begins a transform; idle returns
// high when the last level is finished.
//
// Stripe geometry at level j: width N >> j, height R = (N/S) >> j, first row
// BLOCK * R (row_base), in the level's own sample grid. The stripe partition,
// the level order and the row/column cascade follow the design; the one-way
// exchange of row-transformed boundary rows, the ownership shift of OVL/2 rows
// and the barrier are this implementation's choices.
module dwt_controller
  import dwt_pkg::*;
#(
  parameter int N     = 512,  // image size N x N
  parameter int S     = 4,    // number of stripes / processors
  parameter int J     = 3,    // decomposition levels
  parameter int BLOCK = 0,    // index of this processor's stripe (0 = top)
  localparam int RLW  = $clog2(N + 1)   // row kernel length / line width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           idle,
  output logic           at_barrier,
  input  logic           level_go,
  output logic [3:0]     level,
  output logic [15:0]    row_base,
  // DMA
  output logic           dma_valid,
  output dma_cmd_t       dma_cmd,
  input  logic           dma_ready,
  input  logic           dma_done,
  // row kernel
  output logic           rk_start,
  output logic [RLW-1:0] rk_len,
  input  logic           rk_done,
  // column engine
  output logic           ce_win_start,
  output logic [RLW-1:0] ce_width,
  output logic [15:0]    ce_own_k0,
  output logic [15:0]    ce_own_k1,
  output logic           ce_flush,
  input  logic           ce_done,
  // incoming boundary buffer status
  input  logic           rx_full,
  output logic           rx_clear
);

  localparam bit HAS_PREV = (BLOCK > 0);
  localparam bit HAS_NEXT = (BLOCK < S - 1);

  typedef enum logic [3:0] {
    C_IDLE, C_BARRIER, C_WIN,
    C_ROW_LD, C_ROW_LD_W, C_ROW_K, C_ROW_K_W, C_ROW_FD, C_ROW_FD_W,
    C_SEND, C_SEND_W, C_WAIT_RX, C_RX_FD, C_RX_FD_W, C_FLUSH, C_FLUSH_W
  } cstate_e;

  cstate_e     state_q;
  logic [3:0]  level_q;
  logic [15:0] idx_q;          // current row
  logic        sent_q;         // outgoing buffer sent at this level

  // level geometry
  logic [15:0] width, rows, base;
  always_comb begin
    width = 16'(N) >> level_q;
    rows  = 16'(N / S) >> level_q;
    base  = 16'(BLOCK) * rows;
  end

  always_comb begin
    dma_cmd         = '0;
    dma_cmd.level   = level_q;
    dma_cmd.width   = width;
    dma_cmd.fixed   = idx_q;
    dma_cmd.k1      = width;
    dma_cmd.tx_line = idx_q - base;
    dma_valid       = 1'b0;
    case (state_q)
      C_ROW_LD: begin
        dma_valid  = 1'b1;
        dma_cmd.op = DMA_ROW_LOAD;
      end
      C_ROW_FD: begin
        dma_valid       = 1'b1;
        dma_cmd.op      = DMA_ROW_FEED;
        dma_cmd.tx_copy = HAS_PREV && (idx_q - base < 16'(OVL));
      end
      C_SEND: begin
        dma_valid  = 1'b1;
        dma_cmd.op = DMA_SEND;
      end
      C_RX_FD: begin
        dma_valid  = 1'b1;
        dma_cmd.op = DMA_RX_FEED;
      end
      default: ;
    endcase
  end

  assign idle         = (state_q == C_IDLE);
  assign at_barrier   = (state_q == C_BARRIER);
  assign level        = level_q;
  assign row_base     = base;
  assign rk_start     = (state_q == C_ROW_K);
  assign rk_len       = RLW'(width);
  assign ce_win_start = (state_q == C_WIN);
  assign ce_width     = RLW'(width);
  assign ce_own_k0    = HAS_PREV ? 16'(OVL_HALF) : 16'd0;
  assign ce_own_k1    = rows + (HAS_NEXT ? 16'(OVL_HALF) : 16'd0);
  assign ce_flush     = (state_q == C_FLUSH);

  logic last_row;
  assign last_row = (idx_q + 16'd1 >= base + rows);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= C_IDLE;
      level_q  <= '0;
      idx_q    <= '0;
      sent_q   <= 1'b0;
      rx_clear <= 1'b0;
    end else begin
      rx_clear <= 1'b0;
      case (state_q)
        C_IDLE: if (start) begin
          level_q <= '0;
          state_q <= C_BARRIER;
        end
        C_BARRIER: if (level_go) begin
          idx_q   <= base;
          sent_q  <= 1'b0;
          state_q <= C_WIN;
        end
        C_WIN: state_q <= C_ROW_LD;
        // ---- row pass, cascaded into the column engine ----
        C_ROW_LD:   if (dma_ready) state_q <= C_ROW_LD_W;
        C_ROW_LD_W: if (dma_done)  state_q <= C_ROW_K;
        C_ROW_K:    state_q <= C_ROW_K_W;
        C_ROW_K_W:  if (rk_done)   state_q <= C_ROW_FD;
        C_ROW_FD:   if (dma_ready) state_q <= C_ROW_FD_W;
        C_ROW_FD_W: if (dma_done) begin
          if (HAS_PREV && !sent_q && idx_q - base + 16'd1 >= 16'(OVL)) begin
            state_q <= C_SEND;
          end else if (last_row) begin
            state_q <= C_WAIT_RX;
          end else begin
            idx_q   <= idx_q + 16'd1;
            state_q <= C_ROW_LD;
          end
        end
        // ---- boundary exchange ----
        C_SEND:   if (dma_ready) state_q <= C_SEND_W;
        C_SEND_W: if (dma_done) begin
          sent_q <= 1'b1;
          if (last_row) begin
            state_q <= C_WAIT_RX;
          end else begin
            idx_q   <= idx_q + 16'd1;
            state_q <= C_ROW_LD;
          end
        end
        C_WAIT_RX: if (!HAS_NEXT) state_q <= C_FLUSH;
                   else if (rx_full) state_q <= C_RX_FD;
        C_RX_FD:   if (dma_ready) state_q <= C_RX_FD_W;
        C_RX_FD_W: if (dma_done)  state_q <= C_FLUSH;
        // ---- end of the column window ----
        C_FLUSH:   state_q <= C_FLUSH_W;
        C_FLUSH_W: if (ce_done) begin
          rx_clear <= 1'b1;
          if (level_q + 4'd1 >= 4'(J)) begin
            state_q <= C_IDLE;
          end else begin
            level_q <= level_q + 4'd1;
            state_q <= C_BARRIER;
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

endmodule
