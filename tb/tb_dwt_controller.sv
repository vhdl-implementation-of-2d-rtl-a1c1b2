// tb_dwt_controller: runs the scheduler of a middle stripe (block 1 of 4,
// 64 x 64 image, 2 levels) against a DMA model that accepts each command and
// reports done a few clocks later, a row-kernel model, a column-engine model
// and a test-controlled rx_full. Every DMA command is compared, field by
// field, with the sequence worked out from the stripe geometry: per level, a
// row load and a row feed for each stripe row (the first OVL copied to the
// outgoing buffer), the send right after row OVL-1, then the feed of the
// incoming buffer. Also checks the row-kernel length, the column window
// (opened once per level before the first row, with the level's width and
// owned rows), that the incoming buffer is not fed before rx_full, that the
// flush follows it, that nothing is issued at the barrier before level_go,
// one rx_clear per level, row_base, and idle at the end.
module tb_dwt_controller;
  import dwt_pkg::*;

  localparam int N = 64, S = 4, J = 2, BLOCK = 1;
  localparam int RLW = $clog2(N + 1);

  logic clk = 0, rst_n = 0, start = 0, idle, at_barrier, level_go = 0;
  logic [3:0] level;
  logic [15:0] row_base;
  logic dma_valid, dma_ready, dma_done = 0;
  dma_cmd_t dma_cmd;
  logic rk_start, rk_done = 0;
  logic [RLW-1:0] rk_len, ce_width;
  logic ce_win_start, ce_flush, ce_done = 0;
  logic [15:0] ce_own_k0, ce_own_k1;
  logic rx_full = 0, rx_clear;

  int checks = 0, failures = 0;

  dwt_controller #(.N(N), .S(S), .J(J), .BLOCK(BLOCK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected command list
  dma_cmd_t exp_q [$];
  initial begin
    dma_cmd_t c;
    for (int j = 0; j < J; j++) begin
      int w, r, base;
      w = N >> j; r = (N / S) >> j; base = BLOCK * r;
      for (int i = 0; i < r; i++) begin
        c = '0; c.op = DMA_ROW_LOAD; c.level = 4'(j); c.fixed = 16'(base + i); c.k1 = 16'(w);
        exp_q.push_back(c);
        c = '0; c.op = DMA_ROW_FEED; c.k1 = 16'(w); c.tx_copy = (i < OVL); c.tx_line = 16'(i);
        exp_q.push_back(c);
        if (i == OVL - 1) begin
          c = '0; c.op = DMA_SEND; c.width = 16'(w);
          exp_q.push_back(c);
        end
      end
      c = '0; c.op = DMA_RX_FEED; c.width = 16'(w);
      exp_q.push_back(c);
    end
  end

  function automatic dma_cmd_t used_fields(input dma_cmd_t c);
    dma_cmd_t m;
    m = '0;
    m.op = c.op;
    case (c.op)
      DMA_ROW_LOAD: begin m.level = c.level; m.fixed = c.fixed; m.k0 = c.k0; m.k1 = c.k1; end
      DMA_ROW_FEED: begin
        m.k0 = c.k0; m.k1 = c.k1; m.tx_copy = c.tx_copy;
        if (c.tx_copy) m.tx_line = c.tx_line;
      end
      default: m.width = c.width;
    endcase
    return m;
  endfunction

  // DMA model: accepts when idle, done 3 clocks later
  int dma_busy = 0, n_cmd = 0, n_rx_early = 0, n_at_barrier_cmd = 0, n_rx_clear = 0;
  int n_win = 0, n_flush = 0, n_row_feeds = 0, ce_busy = 0;
  bit rx_fed = 0, win_open = 0;
  assign dma_ready = (dma_busy == 0);
  always @(posedge clk) begin
    dma_done <= 1'b0;
    ce_done  <= 1'b0;
    if (dma_busy > 0) begin
      dma_busy <= dma_busy - 1;
      if (dma_busy == 1) dma_done <= 1'b1;
    end else if (dma_valid) begin
      dma_busy <= 3;
      if (n_cmd < exp_q.size()) begin
        dma_cmd_t e, g;
        e = used_fields(exp_q[n_cmd]);
        g = used_fields(dma_cmd);
        checks++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("cmd %0d: got op %0d fixed %0d k0 %0d k1 %0d, expected op %0d fixed %0d k0 %0d k1 %0d",
                                      n_cmd, g.op, g.fixed, g.k0, g.k1, e.op, e.fixed, e.k0, e.k1);
        end
      end
      if (dma_cmd.op == DMA_RX_FEED && !rx_full) n_rx_early++;
      if (dma_cmd.op == DMA_RX_FEED) rx_fed = 1;
      if (dma_cmd.op == DMA_ROW_FEED) n_row_feeds++;
      chk(dma_cmd.op == DMA_SEND || win_open, "transfer outside an open column window");
      n_cmd++;
    end
    if (at_barrier && dma_valid) n_at_barrier_cmd++;
    if (rx_clear) n_rx_clear++;
    rk_done <= rk_start;
    if (rk_start) chk(int'(rk_len) == (N >> level), "row kernel length");
    if (ce_win_start) begin
      n_win++;
      win_open = 1;
      chk(int'(ce_width) == (N >> level), "column window width");
      chk(ce_own_k0 == 16'(OVL_HALF), "first owned row");
      chk(ce_own_k1 == 16'(((N / S) >> level) + OVL_HALF), "end of owned rows");
      chk(row_base == 16'(BLOCK * ((N / S) >> level)), "row base");
    end
    if (ce_flush) begin
      n_flush++;
      chk(rx_fed && dma_busy == 0 && !dma_done, "flush after the incoming rows were fed");
      rx_fed   = 0;
      ce_busy <= 7;
    end
    if (ce_busy > 0) begin
      ce_busy <= ce_busy - 1;
      if (ce_busy == 1) begin
        ce_done  <= 1'b1;
        win_open = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int j = 0, fed_target = 0; j < J; j++) begin
      fed_target += (N / S) >> j;
      // hold the barrier for a while
      repeat (20) @(negedge clk);
      chk(at_barrier, "waiting at the barrier");
      level_go = 1;
      @(negedge clk) level_go = 0;
      // raise rx_full some time after the last row was fed
      while (n_row_feeds < fed_target) @(negedge clk);
      repeat (50) @(negedge clk);
      rx_full = 1;
      while (!rx_clear) @(negedge clk);
      rx_full = 0;
    end
    repeat (10) @(negedge clk);
    chk(idle, "idle after the last level");
    chk(n_cmd == exp_q.size(), $sformatf("%0d commands, expected %0d", n_cmd, exp_q.size()));
    chk(n_rx_early == 0, "incoming rows fed before they arrived");
    chk(n_at_barrier_cmd == 0, "command issued at the barrier");
    chk(n_rx_clear == J, "one rx_clear per level");
    chk(n_win == J && n_flush == J, "one column window and one flush per level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
