// boundary_buffer: on-chip store for the boundary rows a stripe processor
// exchanges with its neighbour, with its own line/column address controller.
//
// A stripe processor has two: the outgoing buffer keeps the processor's own
// first OVL rows after the row transform (they are sent to the previous
// block), and the incoming buffer collects the OVL rows sent by the next
// block, which are then fed into the processor's column kernel. Storage is
// OVL lines of LINE_LEN words; a word is addressed by (line, column) and the
// controller maps it to line * LINE_LEN + column, so lines shorter than
// LINE_LEN (higher decomposition levels) use the start of each line.
//
// One write port and one read port; the read data is registered (one clock
// latency) and holds its value until the next read. That the rows exchanged
// are rows after the row transform, and their number, are this
// implementation's choices.
module boundary_buffer
  import dwt_pkg::*;
#(
  parameter int LINES    = OVL,
  parameter int LINE_LEN = 512,
  localparam int LNW     = $clog2(LINES),
  localparam int CW      = $clog2(LINE_LEN),
  localparam int DEPTH   = LINES * LINE_LEN,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [LNW-1:0] wline,
  input  logic [CW-1:0]  wcol,
  input  data_t          wdata,
  input  logic           re,
  input  logic [LNW-1:0] rline,
  input  logic [CW-1:0]  rcol,
  output data_t          rdata
);

  data_t mem_q [DEPTH];

  function automatic logic [AW-1:0] lin_addr(input logic [LNW-1:0] l, input logic [CW-1:0] c);
    return AW'(l) * AW'(LINE_LEN) + AW'(c);
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem_q[lin_addr(wline, wcol)] <= wdata;
    if (re) rdata <= mem_q[lin_addr(rline, rcol)];
  end

endmodule
