// column_engine: line-based (9,7) lifting along the columns of a stripe
// window. Row-transformed lines arrive one word per clock, in column order,
// straight from the row kernel (and, at the end of the window, from the
// incoming boundary buffer); finished coefficients leave on the output port
// tagged with their window row and column. Rows and columns are thus filtered
// as a cascade, and the row-transformed image is never written back to main
// memory.
//
// How it works: the four lifting steps run along the column as lines arrive.
// Five line buffers of W_MAX words hold, per column, the last even input line
// (E), the pending odd line (O) and the latest results of predict 1 (D1),
// update 1 (S1) and predict 2 (D2). An odd line k is only stored. An even
// line k >= 2 completes, per column in one clock, predict 1 of row k-1,
// update 1 of row k-2, predict 2 of row k-3 and update 2 of row k-4, and
// emits row k-4 (low pass, scaled by 1/K) and row k-5 (high pass, scaled by
// K). At the window's first row and after its last line (flush), samples
// beyond the window are mirrored at each lifting step (whole-sample symmetric
// extension), exactly as in lifting_kernel. Only rows own_k0 <= r < own_k1
// are emitted.
//
// Interface: win_start (idle) clears the line count and latches width,
// own_k0 and own_k1. Input words are taken on in_valid && in_ready; a line
// ends after `width` words. flush (after the last, odd-numbered line; window
// length even and >= 6) emits the remaining rows and then pulses done.
// Output words are emitted on out_valid with no back-pressure; an even line
// takes up to 2 clocks per word, the flush 5 clocks per column.
//
// The cascade of row and column filtering with line buffers follows the
// design; the line-buffer organisation, the one-column-per-clock schedule and
// the output port are this implementation's choices.
module column_engine
  import dwt_pkg::*;
#(
  parameter int W_MAX = 512,
  localparam int CW   = $clog2(W_MAX),
  localparam int WW   = $clog2(W_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // window control
  input  logic          win_start,
  input  logic [WW-1:0] width,
  input  logic [15:0]   own_k0,
  input  logic [15:0]   own_k1,
  input  logic          flush,
  output logic          done,
  // input lines
  input  logic          in_valid,
  input  data_t         in_data,
  output logic          in_ready,
  // finished coefficients
  output logic          out_valid,
  output logic [15:0]   out_row,
  output logic [CW-1:0] out_col,
  output data_t         out_data
);

  typedef enum logic [2:0] {E_IN, E_HI, E_FL1, E_FL1_HI, E_FL2_LO, E_FL2_HI3, E_FL2_HI1} estate_e;

  data_t lb_e [W_MAX], lb_o [W_MAX], lb_d1 [W_MAX], lb_s1 [W_MAX], lb_d2 [W_MAX];

  estate_e       state_q;
  logic [15:0]   k_q;              // current input line
  logic [CW-1:0] c_q;              // current column
  logic [WW-1:0] width_q;
  logic [15:0]   k0_q, k1_q;
  data_t         hi_q;             // high-pass word waiting for the second output clock
  logic [15:0]   hi_row_q;

  function automatic data_t lift(input data_t x, input data_t a, input data_t b, input coef_t c);
    logic signed [DATA_W:0]          s;
    logic signed [DATA_W+COEF_W+1:0] p;
    s = (DATA_W+1)'(a) + (DATA_W+1)'(b);
    p = (DATA_W+COEF_W+2)'(s) * (DATA_W+COEF_W+2)'(c) + (DATA_W+COEF_W+2)'(1 <<< (COEF_FRAC-1));
    return x + data_t'(p >>> COEF_FRAC);
  endfunction

  function automatic data_t scale(input data_t x, input coef_t c);
    logic signed [DATA_W+COEF_W+1:0] p;
    p = (DATA_W+COEF_W+2)'(x) * (DATA_W+COEF_W+2)'(c) + (DATA_W+COEF_W+2)'(1 <<< (COEF_FRAC-1));
    return data_t'(p >>> COEF_FRAC);
  endfunction

  function automatic logic owned(input logic [15:0] r);
    return (r >= k0_q) && (r < k1_q);
  endfunction

  // ---- the lifting chain for one column ------------------------------------
  // In E_IN: x is the new even line k. In E_FL1: the virtual line k = L,
  // mirrored to x[L-2] (= E). In E_FL2_*: the second flush event.
  data_t e_v, o_v, d1_v, s1_v, d2_v, x_v;
  data_t d1_n, s1_n, d2_n, s2_n, d2_f, s2_f;
  logic  first_pair, second_pair;
  always_comb begin
    e_v  = lb_e[c_q];
    o_v  = lb_o[c_q];
    d1_v = lb_d1[c_q];
    s1_v = lb_s1[c_q];
    d2_v = lb_d2[c_q];
    x_v  = (state_q == E_IN) ? in_data : e_v;
    first_pair  = (k_q == 16'd2);   // update 1 of row 0 mirrors d1[-1] = d1[1]
    second_pair = (k_q == 16'd4);   // update 2 of row 0 mirrors d2[-1] = d2[1]
    d1_n = lift(o_v, e_v, x_v, ALPHA);                        // row k-1
    s1_n = lift(e_v, first_pair ? d1_n : d1_v, d1_n, BETA);   // row k-2
    d2_n = lift(d1_v, s1_v, s1_n, GAMMA);                     // row k-3
    s2_n = lift(s1_v, second_pair ? d2_n : d2_v, d2_n, DELTA);// row k-4
    // second flush event: last odd row L-1 and last even row L-2
    d2_f = lift(d1_v, s1_v, s1_v, GAMMA);                     // row L-1
    s2_f = lift(s1_v, d2_v, d2_f, DELTA);                     // row L-2
  end

  logic even_line, in_fire, col_last;
  assign even_line = !k_q[0];
  assign in_ready  = (state_q == E_IN);
  assign in_fire   = in_valid && in_ready;
  assign col_last  = (WW'(c_q) + WW'(1) >= width_q);

  // ---- outputs -----------------------------------------------------------------
  always_comb begin
    out_valid = 1'b0;
    out_row   = '0;
    out_col   = c_q;
    out_data  = '0;
    case (state_q)
      E_IN: if (in_fire && even_line && k_q >= 16'd4) begin
        out_row   = k_q - 16'd4;
        out_data  = scale(s2_n, K_LO);
        out_valid = owned(out_row);
      end
      E_FL1: begin
        out_row   = k_q - 16'd4;
        out_data  = scale(s2_n, K_LO);
        out_valid = owned(out_row);
      end
      E_HI, E_FL1_HI: begin
        out_row   = hi_row_q;
        out_data  = hi_q;
        out_valid = owned(hi_row_q);
      end
      E_FL2_LO: begin
        out_row   = k_q - 16'd2;
        out_data  = scale(s2_f, K_LO);
        out_valid = owned(out_row);
      end
      E_FL2_HI3: begin
        out_row   = k_q - 16'd3;
        out_data  = scale(d2_v, K_HI);
        out_valid = owned(out_row);
      end
      E_FL2_HI1: begin
        out_row   = k_q - 16'd1;
        out_data  = hi_q;
        out_valid = owned(out_row);
      end
      default: ;
    endcase
  end

  // ---- line buffers --------------------------------------------------------------
  logic upd_even, upd_odd;
  assign upd_odd  = in_fire && !even_line;
  assign upd_even = (in_fire && even_line) || (state_q == E_FL1);
  always_ff @(posedge clk) begin
    if (upd_odd) lb_o[c_q] <= in_data;
    if (upd_even) begin
      lb_e[c_q] <= x_v;
      if (k_q >= 16'd2) begin
        lb_d1[c_q] <= d1_n;
        lb_s1[c_q] <= s1_n;
      end
      if (k_q >= 16'd4) lb_d2[c_q] <= d2_n;
    end
  end

  // ---- sequencing ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= E_IN;
      k_q      <= '0;
      c_q      <= '0;
      width_q  <= '0;
      k0_q     <= '0;
      k1_q     <= '0;
      hi_q     <= '0;
      hi_row_q <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        E_IN: begin
          if (win_start) begin
            k_q     <= '0;
            c_q     <= '0;
            width_q <= width;
            k0_q    <= own_k0;
            k1_q    <= own_k1;
          end else if (flush) begin
            c_q     <= '0;
            state_q <= E_FL1;
          end else if (in_fire) begin
            if (even_line && k_q >= 16'd6) begin
              hi_q     <= scale(d2_v, K_HI);   // row k-5
              hi_row_q <= k_q - 16'd5;
              state_q  <= E_HI;
            end else if (col_last) begin
              c_q <= '0;
              k_q <= k_q + 16'd1;
            end else begin
              c_q <= c_q + CW'(1);
            end
          end
        end
        E_HI: begin
          state_q <= E_IN;
          if (col_last) begin
            c_q <= '0;
            k_q <= k_q + 16'd1;
          end else begin
            c_q <= c_q + CW'(1);
          end
        end
        // first flush event: virtual even line L (k_q = L), mirrored
        E_FL1: begin
          hi_q     <= scale(d2_v, K_HI);       // row L-5
          hi_row_q <= k_q - 16'd5;
          state_q  <= E_FL1_HI;
        end
        E_FL1_HI: begin
          if (col_last) begin
            c_q     <= '0;
            state_q <= E_FL2_LO;
          end else begin
            c_q     <= c_q + CW'(1);
            state_q <= E_FL1;
          end
        end
        // second flush event (k_q = L): rows L-2, L-3, L-1
        E_FL2_LO: begin
          hi_q    <= scale(d2_f, K_HI);
          state_q <= E_FL2_HI3;
        end
        E_FL2_HI3: state_q <= E_FL2_HI1;
        E_FL2_HI1: begin
          if (col_last) begin
            c_q     <= '0;
            state_q <= E_IN;
            done    <= 1'b1;
          end else begin
            c_q     <= c_q + CW'(1);
            state_q <= E_FL2_LO;
          end
        end
        default: state_q <= E_IN;
      endcase
    end
  end

  // Window control only arrives between lines of work
  assert property (@(posedge clk) disable iff (!rst_n)
                   (win_start || flush) |-> (state_q == E_IN));

endmodule
