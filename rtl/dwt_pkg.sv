// dwt_pkg: types and constants shared by the stripe-parallel 2-D DWT.
//
// The transform is the irreversible (9,7) wavelet computed by lifting: two
// predict steps and two update steps, then a final scaling of the low-pass
// (even) and high-pass (odd) samples. Coefficients are fixed point with
// COEF_FRAC fraction bits. Each lifting step adds
// round(coef * (left + right)) to the target sample, where round() adds half an
// LSB and shifts right arithmetically. Samples are DATA_W-bit two's complement:
// 8-bit pixels grow in the wavelet domain, and 16 bits per coefficient matches
// the doubling of storage the design allows for that growth.
//
// Coefficient values are those of the JPEG2000 Part 1 (9,7) filter, quantised
// to COEF_FRAC bits. The scaling (low * 1/K, high * K) gives the low pass a DC
// gain of 1 and the high pass a Nyquist gain of 2.
// The (9,7) filter, lifting, and 16-bit coefficient words follow the design;
// the fixed-point format, rounding, the boundary overlap of OVL rows and the
// DMA command set are this implementation's choices.
package dwt_pkg;

  localparam int DATA_W    = 16;   // sample / coefficient word
  localparam int COEF_W    = 16;   // lifting coefficient word
  localparam int COEF_FRAC = 12;   // fraction bits of the coefficients

  // Rows of boundary data exchanged between neighbouring stripes (F_l - 1 for
  // the 9-tap analysis low pass), and the first row a block owns after its top
  // stripe boundary (half of it).
  localparam int OVL      = 8;
  localparam int OVL_HALF = OVL / 2;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // round(c * 2^12) of alpha, beta, gamma, delta, 1/K and K
  localparam coef_t ALPHA = -16'sd6497;  // -1.586134342
  localparam coef_t BETA  = -16'sd217;   // -0.052980118
  localparam coef_t GAMMA =  16'sd3616;  //  0.882911075
  localparam coef_t DELTA =  16'sd1817;  //  0.443506852
  localparam coef_t K_LO  =  16'sd3330;  //  1/K, K = 1.230174105
  localparam coef_t K_HI  =  16'sd5039;  //  K

  // Lifting coefficient of step s (0..3)
  function automatic coef_t lift_coef(input logic [1:0] s);
    case (s)
      2'd0:    return ALPHA;
      2'd1:    return BETA;
      2'd2:    return GAMMA;
      default: return DELTA;
    endcase
  endfunction

  // Transfers the DMA engine performs
  typedef enum logic [1:0] {
    DMA_ROW_LOAD,   // main memory row          -> row kernel
    DMA_ROW_FEED,   // row kernel               -> column engine (+ outgoing boundary buffer)
    DMA_RX_FEED,    // incoming boundary buffer -> column engine
    DMA_SEND        // outgoing boundary buffer -> link to the previous block
  } dma_op_e;

  // One DMA transfer. Coordinates are in the current level's sample grid
  // (level j addresses main-memory row r << j, column c << j).
  typedef struct packed {
    dma_op_e     op;
    logic [3:0]  level;     // decomposition level j (0 = first)
    logic [15:0] fixed;     // row of a row load
    logic [15:0] k0;        // first element of a row load / feed
    logic [15:0] k1;        // one past the last element
    logic [15:0] width;     // line width (boundary send, incoming-buffer feed)
    logic        tx_copy;   // row feeds: also copy the row to the outgoing buffer
    logic [15:0] tx_line;   // row feeds: line of the outgoing buffer
  } dma_cmd_t;

endpackage
