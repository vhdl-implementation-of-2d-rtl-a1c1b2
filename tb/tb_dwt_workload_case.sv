// tb_dwt_workload_case: one configuration of the stripe-parallel DWT with its
// own main-memory model. Loads a random 8-bit N x N image, runs the transform,
// and compares all N*N words with the whole-image reference. Reports its check
// and failure counts and the clock count of the transform through its ports.
module tb_dwt_workload_case #(
  parameter int N = 512,
  parameter int S = 4,
  parameter int J = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cycles,
  output bit   finished
);
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int MAW = 2 * $clog2(N);

  logic           start = 0, busy, done;
  logic           mem_en [S], mem_we [S];
  logic [MAW-1:0] mem_addr [S];
  data_t          mem_wdata [S], mem_rdata [S];
  data_t          mem [N * N];

  dwt_top #(.N(N), .S(S), .J(J)) dut (.*);

  always_ff @(posedge clk) begin
    for (int b = 0; b < S; b++) begin
      if (rst_n && mem_en[b] && mem_we[b]) mem[mem_addr[b]] <= mem_wdata[b];
      if (mem_en[b] && !mem_we[b]) mem_rdata[b] <= mem[mem_addr[b]];
    end
  end

  always @(posedge clk) if (busy) cycles++;

  initial begin
    int img[];
    checks = 0; failures = 0; cycles = 0; finished = 0;
    img = new[N * N];
    foreach (img[i]) begin
      img[i] = int'($urandom_range(0, 255));
      mem[i] = data_t'(img[i]);
    end
    @(posedge rst_n);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    dwt2d(img, N, J);
    for (int i = 0; i < N * N; i++) begin
      checks++;
      if (int'(mem[i]) != img[i]) begin
        failures++;
        if (failures < 5) $display("N=%0d S=%0d J=%0d: word %0d got %0d expected %0d", N, S, J, i, mem[i], img[i]);
      end
    end
    $display("N=%0d S=%0d J=%0d: %0d clocks, %0d mismatches", N, S, J, cycles, failures);
    finished = 1;
  end
endmodule
