// tb_dwt_top_full: the end-to-end test of tb_dwt_top at the design's default
// size: a 512 x 512 image, 4 stripe processors, 3 levels, top-level
// parameters left at their defaults. Same checks: every memory word against
// the whole-image reference transform, and the counts of level barriers,
// boundary words, row-kernel runs, column windows and coefficients written,
// for a random and a checkerboard image.
module tb_dwt_top_full;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int N = 512, S = 4, J = 3;  // the design defaults
  localparam int MAW = 2 * $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic           mem_en [S], mem_we [S];
  logic [MAW-1:0] mem_addr [S];
  data_t          mem_wdata [S], mem_rdata [S];

  int checks = 0, failures = 0;
  data_t mem [N * N];

  dwt_top dut (.*);

  always #5 clk = ~clk;

  // main memory model, one port per processor, one-clock read latency
  always_ff @(posedge clk) begin
    for (int b = 0; b < S; b++) begin
      if (rst_n && mem_en[b] && mem_we[b]) mem[mem_addr[b]] <= mem_wdata[b];
      if (mem_en[b] && !mem_we[b]) mem_rdata[b] <= mem[mem_addr[b]];
    end
  end

  // mechanism counters
  int n_level_go = 0, n_link_words = 0, n_row_loads = 0, n_col_loads = 0, n_col_writes = 0;
  int cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.level_go) n_level_go++;
    for (int b = 0; b < S; b++) if (dut.lnk_valid[b] && dut.lnk_ready[b]) n_link_words++;
    if (busy) cycles++;
  end
  for (genvar b = 0; b < S; b++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_unit[b].u_unit.u_row_kernel.start) n_row_loads++;
      if (dut.g_unit[b].u_unit.u_col_engine.win_start) n_col_loads++;
      if (dut.g_unit[b].u_unit.u_col_engine.out_valid) n_col_writes++;
    end
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_image(input int seed_kind);
    int img[] = new[N * N];
    int exp_link = 0, exp_rows = 0, exp_cols = 0, exp_writes = 0;
    foreach (img[i]) begin
      case (seed_kind)
        0: img[i] = int'($urandom_range(0, 255));
        default: img[i] = ((i / N) / 8 + (i % N) / 8) % 2 ? 255 : 0;  // checkerboard, sharp edges at stripe borders
      endcase
      mem[i] = data_t'(img[i]);
    end
    n_level_go = 0; n_link_words = 0; n_row_loads = 0; n_col_loads = 0; n_col_writes = 0; cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    dwt2d(img, N, J);
    for (int i = 0; i < N * N; i++) begin
      checks++;
      if (int'(mem[i]) != img[i]) begin
        failures++;
        if (failures < 10) $display("word r=%0d c=%0d: got %0d expected %0d", i / N, i % N, mem[i], img[i]);
      end
    end
    for (int j = 0; j < J; j++) begin
      exp_link += (S - 1) * OVL * (N >> j);
      exp_rows += N >> j;
      exp_cols += S;
      exp_writes += (N >> j) * (N >> j);
    end
    checks++;
    if (n_level_go != J) begin failures++; $display("level barriers %0d, expected %0d", n_level_go, J); end
    checks++;
    if (n_link_words != exp_link) begin failures++; $display("boundary words %0d, expected %0d", n_link_words, exp_link); end
    checks++;
    if (n_row_loads != exp_rows || n_col_loads != exp_cols) begin
      failures++;
      $display("row kernel runs %0d column windows %0d, expected %0d %0d", n_row_loads, n_col_loads, exp_rows, exp_cols);
    end
    checks++;
    if (n_col_writes != exp_writes) begin
      failures++;
      $display("coefficients written %0d, expected %0d", n_col_writes, exp_writes);
    end
    $display("image %0d: %0d cycles, %0d barriers, %0d boundary words", seed_kind, cycles, n_level_go, n_link_words);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_image(0);
    run_image(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
