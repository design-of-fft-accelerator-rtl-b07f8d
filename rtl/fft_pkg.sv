// fft_pkg -- types and constants shared by the 64-point R2^3SDF branch FFT.
//
// A sample is a complex number with 16-bit two's-complement real and
// imaginary parts (the 16-bit datapath width of the design). Twiddle
// coefficients are 16-bit too, in Q2.14 format so that +1.0 is exactly
// 16384. Every butterfly divides its result by two, so the 64-point output
// is the DFT scaled by 2^-6 and never overflows the 16-bit word.
package fft_pkg;

  localparam int DW      = 16;   // datapath word width
  localparam int TW      = 16;   // twiddle word width (Q2.14)
  localparam int TW_FRAC = 14;   // fraction bits of a twiddle coefficient
  localparam int FFT_N   = 64;   // branch FFT length
  localparam int LOG2N   = 6;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [TW-1:0] coef_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } tw_t;

  // Saturate a wider signed value to DW bits.
  function automatic sample_t sat(input logic signed [DW+3:0] v);
    if (v > $signed((DW+4)'(2**(DW-1) - 1)))       return sample_t'(2**(DW-1) - 1);
    else if (v < -$signed((DW+4)'(2**(DW-1))))     return sample_t'(-(2**(DW-1)));
    else                                           return sample_t'(v);
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja. Swapping parts costs no logic;
  // the negation saturates the single value -2^(DW-1).
  function automatic cplx_t mul_mj(input cplx_t x);
    cplx_t y;
    y.re = x.im;
    y.im = sat(-$signed({{4{x.re[DW-1]}}, x.re}));
    return y;
  endfunction

  // Reverse the bit order of an LOG2N-bit index.
  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] v);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < LOG2N; i++) r[i] = v[LOG2N-1-i];
    return r;
  endfunction

endpackage
