// tb_boundary_buffer: writes every (line, column) of the boundary buffer with
// a random word, reads them back in random order and checks each word one
// clock after the read, and that the read data holds while no read is issued.
// Uses a short line length (64) to keep the run short.
module tb_boundary_buffer;
  import dwt_pkg::*;

  localparam int LINES = 8, LINE_LEN = 64;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [2:0] wline = '0, rline = '0;
  logic [5:0] wcol = '0, rcol = '0;
  data_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  int model [LINES][LINE_LEN];

  boundary_buffer #(.LINES(LINES), .LINE_LEN(LINE_LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l, c, wl, wc;
    for (int l = 0; l < LINES; l++)
      for (int c = 0; c < LINE_LEN; c++) begin
        @(negedge clk);
        we = 1; wline = 3'(l); wcol = 6'(c);
        model[l][c] = int'($urandom_range(0, 65535)) - 32768;
        wdata = data_t'(model[l][c]);
      end
    @(negedge clk) we = 0;
    for (int t = 0; t < 2000; t++) begin
      l = int'($urandom_range(0, LINES - 1));
      c = int'($urandom_range(0, LINE_LEN - 1));
      @(negedge clk);
      re = 1; rline = 3'(l); rcol = 6'(c);
      // an unrelated write at the same time must not disturb the read
      if (t % 3 == 0) begin
        wl = int'($urandom_range(0, LINES - 1));
        wc = int'($urandom_range(0, LINE_LEN - 1));
        if (wl != l || wc != c) begin
          we = 1; wline = 3'(wl); wcol = 6'(wc);
          model[wl][wc] = int'($urandom_range(0, 65535)) - 32768;
          wdata = data_t'(model[wl][wc]);
        end
      end
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (int'(rdata) != model[l][c]) begin
        failures++;
        if (failures < 10) $display("line %0d col %0d: got %0d expected %0d", l, c, rdata, model[l][c]);
      end
      @(negedge clk);
      checks++;
      if (int'(rdata) != model[l][c]) begin
        failures++;
        $display("read data not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
