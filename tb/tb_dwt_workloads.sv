// tb_dwt_workloads: the partitions and depths the design is evaluated at, all
// on 512 x 512 images: 2 stripes with 5 levels, 4 stripes with 4 levels,
// 8 stripes with 3 levels and 16 stripes with 3 levels (the deepest each
// stripe height allows with 8 boundary rows). Each runs in parallel with its
// own memory and is checked word for word against the reference transform.
module tb_dwt_workloads;
  logic clk = 0, rst_n = 0;
  int c [4], f [4], cyc [4];
  bit fin [4];

  always #5 clk = ~clk;

  tb_dwt_workload_case #(.N(512), .S(2),  .J(5)) u_s2  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .cycles(cyc[0]), .finished(fin[0]));
  tb_dwt_workload_case #(.N(512), .S(4),  .J(4)) u_s4  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .cycles(cyc[1]), .finished(fin[1]));
  tb_dwt_workload_case #(.N(512), .S(8),  .J(3)) u_s8  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .cycles(cyc[2]), .finished(fin[2]));
  tb_dwt_workload_case #(.N(512), .S(16), .J(3)) u_s16 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .cycles(cyc[3]), .finished(fin[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(fin[0] && fin[1] && fin[2] && fin[3])) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    // more stripes must finish a level sooner: the clock counts fall with S
    checks++;
    if (!(cyc[2] > cyc[3])) begin
      failures++;
      $display("16 stripes not faster than 8: %0d vs %0d", cyc[3], cyc[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
