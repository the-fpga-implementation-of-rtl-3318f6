// wnn_pkg: widths, fixed-point scaling and filter coefficients shared by the
// wavelet front end and the neuron.
//
// Wavelet path: 16-bit signed current samples, 32-bit coefficients. The DB2
// decomposition filters are scaled by 16 and rounded to integers, so every
// wavelet coefficient is 16 times its true value. Index 0 of each coefficient
// array multiplies the newest sample.
//
// Neuron path: inputs, weights and the tanh argument are signed numbers
// scaled by 2^18 (Q4.18 in 22 bits, range [-8, 8)). The tanh result is scaled
// by 2^18 as well and fits 20 signed bits.
package wnn_pkg;

  // ---------------- wavelet transform ----------------
  localparam int WT_IN_W  = 16;
  localparam int WT_OUT_W = 32;
  localparam int WT_TAPS  = 4;
  localparam int WT_COEF_W = 6;

  typedef logic signed [WT_COEF_W-1:0] wt_coef_t;
  typedef wt_coef_t wt_coefs_t [WT_TAPS];

  // Low-pass H and high-pass G: DB2 decomposition filters x16, rounded.
  localparam wt_coefs_t WT_H = '{-6'sd2,  6'sd4,  6'sd13,  6'sd8};
  localparam wt_coefs_t WT_G = '{-6'sd8,  6'sd13, -6'sd4, -6'sd2};

  // ---------------- neuron and excitation function ----------------
  localparam int FRAC       = 18;          // fixed-point scale 2^18
  localparam int NN_W       = 22;          // inputs, weights, tanh argument
  localparam int TANH_OUT_W = 20;          // tanh result
  localparam int TANH_ADDR_W = 10;         // 1024 segments
  localparam int TANH_ROM_W = 24;          // coefficient word
  localparam int TANH_SLOPE_FRAC = 23;     // slope a1 scaled by 2^23

  typedef logic signed [NN_W-1:0]       nn_word_t;
  typedef logic signed [TANH_OUT_W-1:0] tanh_out_t;

  // Which coefficient a tanh table holds.
  typedef enum logic {TANH_SLOPE = 1'b0, TANH_OFFSET = 1'b1} tanh_table_e;

endpackage
