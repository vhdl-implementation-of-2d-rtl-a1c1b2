// lifting_kernel: one-dimensional (9,7) wavelet kernel working on a vector held
// in its own sample buffer: the row kernel of a stripe processor (MAXLEN =
// image width). The column direction uses the same lifting steps, computed
// line by line in column_engine.
//
// Operation: the vector is written through the load port (ld_en/ld_idx/ld_data)
// while the kernel is idle. A start pulse with len (even, >= 2) runs the four
// lifting steps in place, one target sample per clock: predict steps update the
// odd samples, update steps the even ones, each adding
// round(coef * (x[n-1] + x[n+1])). Samples outside the vector are taken by
// whole-sample symmetric extension (x[-1] = x[1], x[len] = x[len-2]). A scaling
// pass then multiplies even samples by 1/K and odd samples by K. When done
// pulses, even indices hold the low-pass and odd indices the high-pass
// coefficients (interleaved, in place); they are read through the
// asynchronous read port rd_idx/rd_data.
//
// Timing: start to done takes 4 * len/2 + len + 1 = 3*len + 1 clocks. busy is
// high from the clock after start until done.
//
// The lifting factorisation follows the design's choice of lifting over
// convolution; the one-sample-per-clock sequential schedule, the fixed-point
// format and the symmetric extension are this implementation's choices.
module lifting_kernel
  import dwt_pkg::*;
#(
  parameter int MAXLEN = 512,
  localparam int AW    = $clog2(MAXLEN),      // sample index
  localparam int LW    = $clog2(MAXLEN + 1)   // vector length
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,
  input  logic [LW-1:0] len,
  output logic          busy,
  output logic          done,
  // load port (idle only)
  input  logic          ld_en,
  input  logic [AW-1:0] ld_idx,
  input  data_t         ld_data,
  // read port (combinational)
  input  logic [AW-1:0] rd_idx,
  output data_t         rd_data
);

  typedef enum logic [1:0] {K_IDLE, K_LIFT, K_SCALE} kstate_e;

  data_t         buf_q [MAXLEN];
  kstate_e       state_q;
  logic [1:0]    step_q;
  logic [AW-1:0] n_q;
  logic [LW-1:0] len_q;
  logic [LW:0]   n_ext;                // n_q widened for length compares

  // ---- one lifting or scaling operation on sample n_q ----------------------
  logic [AW-1:0]            il, ir;
  data_t                    xl, xr, xn, lift_res, scale_res;
  logic signed [DATA_W:0]   sum;
  logic signed [DATA_W+COEF_W+1:0] prod, sprod;
  coef_t                    c;

  always_comb begin
    n_ext = (LW+1)'(n_q);
    il = (n_q == '0) ? AW'(1) : n_q - AW'(1);
    ir = (n_ext + (LW+1)'(1) >= (LW+1)'(len_q)) ? n_q - AW'(1) : n_q + AW'(1);
    xl = buf_q[il];
    xr = buf_q[ir];
    xn = buf_q[n_q];
    c  = lift_coef(step_q);
    sum  = (DATA_W+1)'(xl) + (DATA_W+1)'(xr);
    prod = (DATA_W+COEF_W+2)'(sum) * (DATA_W+COEF_W+2)'(c)
         + (DATA_W+COEF_W+2)'(1 <<< (COEF_FRAC-1));
    lift_res = xn + data_t'(prod >>> COEF_FRAC);
    sprod = (DATA_W+COEF_W+2)'(xn) * (DATA_W+COEF_W+2)'(n_q[0] ? K_HI : K_LO)
          + (DATA_W+COEF_W+2)'(1 <<< (COEF_FRAC-1));
    scale_res = data_t'(sprod >>> COEF_FRAC);
  end

  always_ff @(posedge clk) begin
    if (state_q == K_IDLE && ld_en)
      buf_q[ld_idx] <= ld_data;
    else if (state_q == K_LIFT)
      buf_q[n_q] <= lift_res;
    else if (state_q == K_SCALE)
      buf_q[n_q] <= scale_res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= K_IDLE;
      step_q  <= '0;
      n_q     <= '0;
      len_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        K_IDLE: if (start) begin
          len_q   <= len;
          step_q  <= 2'd0;
          n_q     <= AW'(1);          // first step (predict) targets odd samples
          state_q <= K_LIFT;
        end
        K_LIFT: begin
          if (n_ext + (LW+1)'(2) >= (LW+1)'(len_q)) begin
            step_q <= step_q + 2'd1;
            n_q    <= step_q[0] ? AW'(1) : AW'(0);  // next step's parity
            if (step_q == 2'd3) begin
              n_q     <= '0;
              state_q <= K_SCALE;
            end
          end else begin
            n_q <= n_q + AW'(2);
          end
        end
        K_SCALE: begin
          if (n_ext == (LW+1)'(len_q) - (LW+1)'(1)) begin
            state_q <= K_IDLE;
            done    <= 1'b1;
          end
          n_q <= n_q + AW'(1);
        end
        default: state_q <= K_IDLE;
      endcase
    end
  end

  assign busy    = (state_q != K_IDLE);
  assign rd_data = buf_q[rd_idx];

  // The vector must have even length and fit the buffer
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && state_q == K_IDLE) |-> (len >= LW'(2) && int'(len) <= MAXLEN && !len[0]));

endmodule
