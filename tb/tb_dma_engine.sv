// tb_dma_engine: drives each kind of DMA transfer against models of main
// memory, a kernel buffer, a column-engine sink and both boundary buffers, and
// checks where every word goes: a row load at a level above 0 (strided
// addresses, latency len + 2 clocks), a row feed with the copy into the
// outgoing buffer under random back-pressure, a partial row feed without a
// copy (outgoing buffer untouched), the feed of the incoming buffer, and the
// order and count of words sent over the link with random back-pressure.
// Image size 64.
module tb_dma_engine;
  import dwt_pkg::*;

  localparam int N = 64, KAW = 6, LNW = 3, CW = 6, MAW = 12;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, done;
  dma_cmd_t cmd = '0;
  logic mem_en;
  logic [MAW-1:0] mem_addr;
  data_t mem_rdata;
  logic feed_valid, feed_ready = 1;
  data_t feed_data;
  logic k_ld_en;
  logic [KAW-1:0] k_ld_idx, k_rd_idx;
  data_t k_ld_data, k_rd_data;
  logic tx_we, tx_re, rx_re;
  logic [LNW-1:0] tx_wline, tx_rline, rx_rline;
  logic [CW-1:0] tx_wcol, tx_rcol, rx_rcol;
  data_t tx_wdata, tx_rdata, rx_rdata;
  logic lnk_valid, lnk_ready = 1;
  data_t lnk_data;

  int checks = 0, failures = 0;
  data_t mem [N * N];
  data_t kbuf [N];
  data_t txb [OVL][N], rxb [OVL][N];

  dma_engine #(.N(N), .KAW(KAW), .LINE_LEN(N)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_en) mem_rdata <= mem[mem_addr];
    if (rst_n && k_ld_en) kbuf[k_ld_idx] <= k_ld_data;
    if (rst_n && tx_we) txb[tx_wline][tx_wcol] <= tx_wdata;
    if (tx_re) tx_rdata <= txb[tx_rline][tx_rcol];
    if (rx_re) rx_rdata <= rxb[rx_rline][rx_rcol];
  end
  assign k_rd_data = kbuf[k_rd_idx];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t rnd();
    return data_t'($urandom_range(0, 65535));
  endfunction

  // issue a command, return clocks from acceptance to done
  task automatic issue(input dma_cmd_t c, output int cyc);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    dma_cmd_t c;
    int cyc;
    foreach (mem[i]) mem[i] = rnd();
    foreach (kbuf[i]) kbuf[i] = rnd();
    foreach (txb[l, i]) begin txb[l][i] = rnd(); rxb[l][i] = rnd(); end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. row load, level 1, row 5, 32 samples
    c = '0; c.op = DMA_ROW_LOAD; c.level = 4'd1; c.fixed = 16'd5; c.k0 = 16'd0; c.k1 = 16'd32;
    issue(c, cyc);
    chk(cyc == 32 + 2, $sformatf("row load latency %0d", cyc));
    for (int k = 0; k < 32; k++) chk(kbuf[k] == mem[(5 << 1) * N + (k << 1)], $sformatf("row load k=%0d", k));

    // 2. row feed of 32 words, copied to outgoing line 3, random back-pressure
    foreach (kbuf[i]) kbuf[i] = rnd();
    fork
      begin
        c = '0; c.op = DMA_ROW_FEED; c.k1 = 16'd32; c.tx_copy = 1'b1; c.tx_line = 16'd3;
        issue(c, cyc);
      end
      begin
        int got = 0;
        while (got < 32) begin
          @(negedge clk);
          feed_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (feed_valid && feed_ready) begin
            chk(feed_data == kbuf[got], $sformatf("row feed word %0d", got));
            got++;
          end
        end
        @(negedge clk) feed_ready = 1;
      end
    join
    for (int k = 0; k < 32; k++) chk(txb[3][k] == kbuf[k], $sformatf("tx copy k=%0d", k));
    @(negedge clk);
    chk(!feed_valid, "no extra word fed");

    // 3. row feed of elements 8..15 without a copy: outgoing buffer untouched
    begin
      data_t tx0 [OVL][N];
      int got;
      foreach (txb[l, i]) tx0[l][i] = txb[l][i];
      foreach (kbuf[i]) kbuf[i] = rnd();
      got = 0;
      fork
        begin
          c = '0; c.op = DMA_ROW_FEED; c.k0 = 16'd8; c.k1 = 16'd16; c.tx_line = 16'd5;
          issue(c, cyc);
        end
        begin
          while (got < 8) begin
            @(posedge clk);
            if (feed_valid && feed_ready) begin
              chk(feed_data == kbuf[8 + got], $sformatf("partial feed word %0d", got));
              got++;
            end
          end
        end
      join
      chk(cyc == 8 + 1, $sformatf("row feed latency %0d", cyc));
      foreach (txb[l, i]) chk(txb[l][i] == tx0[l][i], $sformatf("tx touched %0d,%0d", l, i));
    end

    // 4. feed of the incoming buffer, 8 lines of 12 words, random back-pressure
    fork
      begin
        c = '0; c.op = DMA_RX_FEED; c.width = 16'd12;
        issue(c, cyc);
      end
      begin
        int got = 0;
        while (got < OVL * 12) begin
          @(negedge clk);
          feed_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (feed_valid && feed_ready) begin
            chk(feed_data == rxb[got / 12][got % 12], $sformatf("rx feed word %0d", got));
            got++;
          end
          chk(!lnk_valid, "link idle during rx feed");
        end
        @(negedge clk) feed_ready = 1;
      end
    join

    // 5. send 8 lines of 16 words with random back-pressure
    fork
      begin
        c = '0; c.op = DMA_SEND; c.width = 16'd16;
        issue(c, cyc);
      end
      begin
        int got = 0;
        while (got < OVL * 16) begin
          @(negedge clk);
          lnk_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (lnk_valid && lnk_ready) begin
            chk(lnk_data == txb[got / 16][got % 16], $sformatf("send word %0d", got));
            got++;
          end
        end
        @(negedge clk) lnk_ready = 1;
      end
    join
    @(negedge clk);
    chk(cmd_ready, "idle after send");
    chk(!lnk_valid, "no extra word sent");
    chk(!feed_valid, "nothing fed during send");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
