// tb_column_engine: self-checking test of the line-based column lifting
// engine. Random windows (length L, width W, owned row range) are streamed
// in line by line with random input gaps, then flushed. Every emitted word is
// compared with the reference 1-D lifting of its column; the test also checks
// that each owned (row, column) is emitted exactly once and nothing else is.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_column_engine;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int W_MAX = 64;
  localparam int CW    = $clog2(W_MAX);
  localparam int WW    = $clog2(W_MAX + 1);
  localparam int L_MAX = 48;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          win_start = 1'b0;
  logic [WW-1:0] width = '0;
  logic [15:0]   own_k0 = '0, own_k1 = '0;
  logic          flush = 1'b0;
  logic          done;
  logic          in_valid = 1'b0;
  data_t         in_data = '0;
  logic          in_ready;
  logic          out_valid;
  logic [15:0]   out_row;
  logic [CW-1:0] out_col;
  data_t         out_data;

  column_engine #(.W_MAX(W_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [L_MAX * W_MAX];
  int ref_img [L_MAX * W_MAX];
  int seen [L_MAX * W_MAX];
  int cur_l, cur_w;

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // check every output word as it appears
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_row >= 16'(cur_l) || int'(out_col) >= cur_w || out_row < own_k0 || out_row >= own_k1) begin
        failures++;
        $display("out of range word row %0d col %0d", out_row, out_col);
      end else begin
        seen[out_row * W_MAX + out_col]++;
        if (int'(out_data) != ref_img[out_row * W_MAX + out_col]) begin
          failures++;
          if (failures < 10)
            $display("mismatch L=%0d row %0d col %0d: got %0d want %0d", cur_l, out_row,
                     out_col, out_data, ref_img[out_row * W_MAX + out_col]);
        end
      end
    end
  end

  task automatic run_window(input int l, input int w, input int k0, input int k1, input int mode);
    int v[];
    v = new[l];
    cur_l = l;
    cur_w = w;
    for (int r = 0; r < l; r++)
      for (int c = 0; c < w; c++) begin
        case (mode)
          0: img[r * W_MAX + c] = $urandom_range(0, 255);
          1: img[r * W_MAX + c] = (r % 2) ? 32767 : -32768;
          default: img[r * W_MAX + c] = int'(shortint'($urandom));
        endcase
        seen[r * W_MAX + c] = 0;
      end
    for (int c = 0; c < w; c++) begin
      for (int r = 0; r < l; r++) v[r] = img[r * W_MAX + c];
      lift1d(v, l);
      for (int r = 0; r < l; r++) ref_img[r * W_MAX + c] = v[r];
    end
    @(negedge clk);
    win_start = 1'b1;
    width     = WW'(w);
    own_k0    = 16'(k0);
    own_k1    = 16'(k1);
    @(negedge clk);
    win_start = 1'b0;
    for (int r = 0; r < l; r++)
      for (int c = 0; c < w; c++) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = data_t'(img[r * W_MAX + c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    in_valid = 1'b0;
    flush    = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int r = 0; r < l; r++)
      for (int c = 0; c < w; c++) begin
        checks++;
        if (seen[r * W_MAX + c] != ((r >= k0 && r < k1) ? 1 : 0)) begin
          failures++;
          $display("row %0d col %0d emitted %0d times", r, c, seen[r * W_MAX + c]);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_window(6, 4, 0, 6, 0);
    run_window(8, 8, 0, 8, 1);
    run_window(16, 16, 4, 12, 2);
    run_window(40, 64, 0, 36, 0);
    run_window(48, 64, 4, 44, 2);
    run_window(24, 2, 0, 24, 2);
    for (int t = 0; t < 12; t++) begin
      int l, w, k0, k1;
      l  = 2 * $urandom_range(3, L_MAX / 2);
      w  = 2 * $urandom_range(1, W_MAX / 2);
      k0 = $urandom_range(0, l / 2);
      k1 = $urandom_range(k0, l);
      run_window(l, w, k0, k1, t % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
