// src6_pkg: types and constants shared by the MAP kernels.
// The kernels work on IEEE-754 binary64 numbers (the matrix kernels and the
// floating-point FFT are 64-bit floating point). A complex value is a pair
// of binary64 numbers; the on-board memory (OBM) word is 64 bits wide.
package src6_pkg;
  localparam int unsigned FP_EW = 11;                 // binary64 exponent bits
  localparam int unsigned FP_MW = 52;                 // binary64 fraction bits
  localparam int unsigned FP_W  = 1 + FP_EW + FP_MW;  // 64
  localparam int unsigned OBM_DW = 64;                // on-board memory word
  localparam int unsigned OBM_AW = 19;                // 4 MB bank / 8 B words

  typedef logic [FP_W-1:0] fp64_t;

  typedef struct packed {
    fp64_t re;
    fp64_t im;
  } cplx_t;

  // states of the FFT engine, brought out for observation
  typedef enum logic [2:0] {
    FFT_IDLE  = 3'd0,
    FFT_LOAD  = 3'd1,
    FFT_BFLY  = 3'd2,
    FFT_COPY  = 3'd3,
    FFT_STORE = 3'd4,
    FFT_DONE  = 3'd5
  } fft_state_e;
endpackage
