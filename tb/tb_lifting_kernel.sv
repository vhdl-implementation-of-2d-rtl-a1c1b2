// tb_lifting_kernel: self-checking test of the 1-D (9,7) lifting kernel.
// Loads random and structured vectors of several even lengths, runs the
// kernel, and compares every output sample with the reference model; checks
// the start-to-done latency of 3*len+1 clocks; checks that a constant input
// gives low-pass samples equal to the constant and high-pass samples near 0.
module tb_lifting_kernel;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int MAXLEN = 512;
  localparam int AW = $clog2(MAXLEN);
  localparam int LW = $clog2(MAXLEN + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [LW-1:0] len = '0;
  logic ld_en = 0;
  logic [AW-1:0] ld_idx = '0, rd_idx = '0;
  data_t ld_data = '0, rd_data;

  int checks = 0, failures = 0;

  lifting_kernel #(.MAXLEN(MAXLEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vec(input int v[], input int l, input bit dc_check);
    int ref_v[] = new[l];
    int cyc;
    for (int i = 0; i < l; i++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = AW'(i); ld_data = data_t'(v[i]);
      ref_v[i] = v[i];
    end
    @(negedge clk);
    ld_en = 0; start = 1; len = LW'(l);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 3 * l + 1) begin
      failures++;
      $display("len %0d: latency %0d, expected %0d", l, cyc, 3 * l + 1);
    end
    lift1d(ref_v, l);
    for (int i = 0; i < l; i++) begin
      rd_idx = AW'(i);
      #1;
      checks++;
      if (int'(rd_data) != ref_v[i]) begin
        failures++;
        if (failures < 10) $display("len %0d idx %0d: got %0d expected %0d", l, i, rd_data, ref_v[i]);
      end
      if (dc_check) begin
        checks++;
        if ((i % 2 == 0) ? (int'(rd_data) - v[0] > 1 || int'(rd_data) - v[0] < -1)
                         : (int'(rd_data) > 1 || int'(rd_data) < -1)) begin
          failures++;
          $display("dc len %0d idx %0d: %0d", l, i, rd_data);
        end
      end
    end
  endtask

  initial begin
    int v[];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // constant input
    v = new[64];
    foreach (v[i]) v[i] = 100;
    run_vec(v, 64, 1);
    // random pixels, several lengths
    foreach (v[i]) v[i] = 0;
    for (int t = 0; t < 6; t++) begin
      int l;
      case (t)
        0: l = 2;
        1: l = 8;
        2: l = 34;
        3: l = 136;
        4: l = 256;
        default: l = 512;
      endcase
      v = new[l];
      foreach (v[i]) v[i] = int'($urandom_range(0, 255));
      run_vec(v, l, 0);
    end
    // signed inputs with large swings (as after a row pass)
    v = new[128];
    foreach (v[i]) v[i] = int'($urandom_range(0, 1600)) - 800;
    run_vec(v, 128, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
