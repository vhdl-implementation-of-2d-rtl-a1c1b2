// tb_dwt_unit: one middle stripe processor (block 1 of 4, 64 x 64 image, one
// level) with the testbench playing both neighbours and main memory. The
// testbench feeds the next block's boundary rows (row-transformed rows 32..39,
// from the reference model) over the incoming link with random gaps, takes
// the outgoing link's words with random back-pressure and checks them against
// the processor's own row-transformed rows 16..23, and releases the barrier.
// After the run it checks: the owned rows 20..35 against the whole-image
// reference transform, all other rows untouched (rows 16..19 are finished by
// the previous block; the row-transformed rows never go back to memory), and
// that exactly one memory write was made per owned word.
module tb_dwt_unit;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int N = 64, S = 4, J = 1, BLOCK = 1;
  localparam int MAW = 12, R = N / S, BASE = BLOCK * R;

  logic clk = 0, rst_n = 0, start = 0, idle, at_barrier, level_go = 0;
  logic mem_en, mem_we;
  logic [MAW-1:0] mem_addr;
  data_t mem_wdata, mem_rdata;
  logic lo_valid, lo_ready = 0, li_valid = 0, li_ready;
  data_t lo_data, li_data = '0;

  int checks = 0, failures = 0;
  data_t mem [N * N];
  int img[], rowt[], full[];

  dwt_unit #(.N(N), .S(S), .J(J), .BLOCK(BLOCK)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst_n && mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) mem_rdata <= mem[mem_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  int n_lo = 0, n_lo_stall = 0, n_wr = 0;
  always @(posedge clk) if (rst_n && mem_en && mem_we) n_wr++;
  // outgoing link: random back-pressure, check words in order
  always @(posedge clk) if (rst_n) begin
    if (lo_valid && lo_ready) begin
      chk(int'(lo_data) == rowt[(BASE + n_lo / N) * N + n_lo % N], $sformatf("outgoing word %0d", n_lo));
      n_lo++;
    end
    if (lo_valid && !lo_ready) n_lo_stall++;
  end
  always @(negedge clk) lo_ready = ($urandom_range(0, 3) != 0);

  initial begin
    int v[];
    img = new[N * N]; rowt = new[N * N]; full = new[N * N];
    v = new[N];
    foreach (img[i]) begin
      img[i] = int'($urandom_range(0, 255));
      mem[i] = data_t'(img[i]);
      full[i] = img[i];
    end
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) v[c] = img[r * N + c];
      lift1d(v, N);
      for (int c = 0; c < N; c++) rowt[r * N + c] = v[c];
    end
    dwt2d(full, N, J);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!at_barrier) @(negedge clk);
    repeat (5) @(negedge clk);
    level_go = 1;
    @(negedge clk) level_go = 0;
    // incoming link: next block's first OVL row-transformed rows, random gaps
    for (int k = 0; k < OVL * N; k++) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      li_valid = 1;
      li_data = data_t'(rowt[(BASE + R + k / N) * N + k % N]);
      @(posedge clk);
      while (!li_ready) @(posedge clk);
      @(negedge clk);
      li_valid = 0;
    end
    while (!idle) @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int e;
        if (r >= BASE + OVL_HALF && r < BASE + R + OVL_HALF) e = full[r * N + c];
        else                                                 e = img[r * N + c];
        chk(int'(mem[r * N + c]) == e, $sformatf("r=%0d c=%0d got %0d expected %0d", r, c, mem[r * N + c], e));
      end
    chk(n_wr == R * N, $sformatf("%0d memory writes, expected %0d", n_wr, R * N));
    chk(n_lo == OVL * N, $sformatf("%0d outgoing words", n_lo));
    chk(n_lo_stall > 0, "outgoing link never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
