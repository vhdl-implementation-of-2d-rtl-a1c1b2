// dwt_top: stripe-parallel 2-D discrete wavelet transform. The N x N image in
// main memory is cut into S horizontal stripes of N/S rows; S identical stripe
// processors (dwt_unit) transform them at the same time, J levels of the
// (9,7) wavelet by lifting, and each sends the boundary rows that its upper
// neighbour needs over a one-way link, so the result is the exact transform of
// the whole image.
//
// Result layout: in place, interleaved. After the transform, main-memory word
// (r, c) holds a level-j coefficient where j is the largest level with r and c
// multiples of 2^j (j < J); at that level, an even row index (r >> j) means
// vertical low pass and an even column index means horizontal low pass. The
// samples with r and c multiples of 2^J hold the final LL band.
//
// The top level also holds the level barrier of the scheduler: once started,
// it releases level j+1 (level_go) only when all processors wait at the
// barrier. start (one clock, while not busy) starts a transform; busy stays
// high until all processors have finished the last level, then done pulses.
//
// Main memory is outside: each processor has its own port (mem_*[b]), all
// onto the same N x N word array, one-clock read latency. Stripes must hold at
// least OVL rows at the last level: N/S >> (J-1) >= OVL.
// The stripe partition into S parallel processors and the default 512 x 512,
// 4-stripe, 3-level configuration follow the design; the shared memory with
// one port per processor, the level barrier and the in-place layout are this
// implementation's choices.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int N    = 512,  // image width and height (pixels)
  parameter int S    = 4,    // stripes = parallel processors
  parameter int J    = 3,    // decomposition levels
  localparam int MAW = 2 * $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           mem_en    [S],
  output logic           mem_we    [S],
  output logic [MAW-1:0] mem_addr  [S],
  output data_t          mem_wdata [S],
  input  data_t          mem_rdata [S]
);

  if (((N / S) >> (J - 1)) < OVL || (N % S) != 0 || ((N / S) >> (J - 1)) % 2 != 0) begin : g_bad_size
    $error("dwt_top: stripes too small for J levels with the boundary overlap");
  end

  logic  idle [S], at_barrier [S];
  logic  lnk_valid [S], lnk_ready [S];   // link from block b to block b-1
  data_t lnk_data [S];
  logic  all_idle, all_barrier, level_go, run_q;

  always_comb begin
    all_idle    = 1'b1;
    all_barrier = 1'b1;
    for (int b = 0; b < S; b++) begin
      all_idle    &= idle[b];
      all_barrier &= at_barrier[b];
    end
  end

  assign level_go = run_q && all_barrier;
  assign busy     = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q && start) begin
        run_q <= 1'b1;
      end else if (run_q && all_idle) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end
    end
  end

  for (genvar b = 0; b < S; b++) begin : g_unit
    logic  li_valid, li_ready, lo_ready;
    data_t li_data;
    if (b < S - 1) begin : g_next
      assign li_valid         = lnk_valid[b+1];
      assign li_data          = lnk_data[b+1];
      assign lnk_ready[b+1]   = li_ready;
    end else begin : g_last
      assign li_valid = 1'b0;
      assign li_data  = '0;
    end
    if (b == 0) begin : g_first
      assign lo_ready = 1'b1;   // the first block never sends
    end else begin : g_prev
      assign lo_ready = lnk_ready[b];
    end

    dwt_unit #(.N(N), .S(S), .J(J), .BLOCK(b)) u_unit (
      .clk, .rst_n,
      .start(start && !run_q), .idle(idle[b]), .at_barrier(at_barrier[b]), .level_go,
      .mem_en(mem_en[b]), .mem_we(mem_we[b]), .mem_addr(mem_addr[b]),
      .mem_wdata(mem_wdata[b]), .mem_rdata(mem_rdata[b]),
      .lo_valid(lnk_valid[b]), .lo_data(lnk_data[b]), .lo_ready(lo_ready),
      .li_valid, .li_data, .li_ready
    );
  end

  assign lnk_ready[0] = 1'b1;

endmodule
