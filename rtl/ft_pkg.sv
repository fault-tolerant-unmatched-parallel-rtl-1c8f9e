// Shared constants and types of the fault tolerant parallel filter bank.
//
// The bank has NFILT = 4 unmatched FIR filters fed with the same input, and
// two redundant filters whose impulse responses are h5 = h1+h2+h3+h4 and
// h6 = h1+2h2+3h3+4h4 (efficient coding scheme, ECS). Each filter produces
// blocks of NSAMP = 8 samples of DW = 8 bits; the 64 bits of one filter are
// stored as two 32-bit words, each in its own memory protected by a decimal
// matrix code (DMC) with a 2 x 4 matrix of 4-bit symbols. These numbers are
// those of the case study the design follows. The tap count and the example
// impulse responses are this design's own choice.
package ft_pkg;

  // Filter bank
  localparam int NFILT = 4;                    // original (unmatched) filters
  localparam int NRED  = 2;                    // redundant filters of the ECS
  localparam int NSAMP = 8;                    // samples per filter per block
  localparam int DW    = 8;                    // sample width
  localparam int TAPS  = 4;                    // FIR length (design choice)

  // DMC word: K1 rows x K2 columns of M-bit symbols
  localparam int DMC_K1 = 2;
  localparam int DMC_K2 = 4;
  localparam int DMC_M  = 4;
  localparam int DMC_N  = DMC_K1 * DMC_K2 * DMC_M;            // 32 data bits
  localparam int DMC_NG = DMC_K1 * (DMC_K2 / 2);              // 4 adder groups
  localparam int DMC_HW = DMC_NG * (DMC_M + 1);               // 20 H bits
  localparam int DMC_VW = DMC_K2 * DMC_M;                     // 16 V bits
  localparam int DMC_RW = DMC_HW + DMC_VW;                    // 36 check bits

  // Storage: every filter block is split into WORDS_PER_FILT DMC words
  localparam int WORDS_PER_FILT = (NSAMP * DW) / DMC_N;       // 2
  localparam int NMEM           = NFILT * WORDS_PER_FILT;     // 8 memories

  typedef logic [DW-1:0]             sample_t;
  typedef logic [TAPS-1:0][DW-1:0]   coef_t;    // coef[k] multiplies x[n-k]

  // Result of the ECS error locator
  typedef enum logic [2:0] {
    ECS_OK      = 3'd0,   // no error
    ECS_F1      = 3'd1,   // original filter 1 .. 4 wrong, corrected
    ECS_F2      = 3'd2,
    ECS_F3      = 3'd3,
    ECS_F4      = 3'd4,
    ECS_R5      = 3'd5,   // redundant filter 5 wrong, outputs untouched
    ECS_R6      = 3'd6,   // redundant filter 6 wrong, outputs untouched
    ECS_UNCORR  = 3'd7    // syndrome fits no single-filter error
  } ecs_loc_e;

  // Example impulse responses of the four unmatched filters (design choice)
  localparam coef_t H1 = {8'd1, 8'd2, 8'd1, 8'd3};   // {c3,c2,c1,c0}
  localparam coef_t H2 = {8'd2, 8'd1, 8'd4, 8'd1};
  localparam coef_t H3 = {8'd1, 8'd3, 8'd2, 8'd2};
  localparam coef_t H4 = {8'd4, 8'd1, 8'd3, 8'd1};

  // Redundant impulse response: w1*h1 + w2*h2 + w3*h3 + w4*h4, modulo 2^DW
  function automatic coef_t ecs_combine(coef_t a, coef_t b, coef_t c, coef_t d,
                                        int w1, int w2, int w3, int w4);
    coef_t r;
    for (int k = 0; k < TAPS; k++) begin
      r[k] = sample_t'(w1 * int'(a[k]) + w2 * int'(b[k]) +
                       w3 * int'(c[k]) + w4 * int'(d[k]));
    end
    return r;
  endfunction

  localparam coef_t H5 = ecs_combine(H1, H2, H3, H4, 1, 1, 1, 1);
  localparam coef_t H6 = ecs_combine(H1, H2, H3, H4, 1, 2, 3, 4);

endpackage
