// fft_pkg: types, constants and arithmetic helpers shared by the 2k/4k/8k
// FFT/IFFT pipeline.
//
// Samples are complex numbers with 16-bit two's-complement real and imaginary
// parts (2x16 bit, as specified for the core's input and output). Butterflies
// compute in a wider format and return to 16 bits by a rounded right shift
// followed by saturation. The transform size is selected with fft_mode_e;
// 8192 points is the largest size and fixes the index and memory widths.
package fft_pkg;

  localparam int DW        = 16;      // bits per real/imaginary part
  localparam int NMAX      = 8192;    // largest transform (8k mode)
  localparam int LOG2_NMAX = 13;
  localparam int WW        = 24;      // width of butterfly intermediates

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [WW-1:0] re;
    logic signed [WW-1:0] im;
  } wcplx_t;

  // Transform size. The encoding is this design's choice.
  typedef enum logic [1:0] {
    MODE_2K = 2'd0,
    MODE_4K = 2'd1,
    MODE_8K = 2'd2
  } fft_mode_e;

  // Number of points of a mode.
  function automatic int unsigned mode_points(fft_mode_e m);
    case (m)
      MODE_2K: return 2048;
      MODE_4K: return 4096;
      default: return 8192;
    endcase
  endfunction

  // Widen a 16-bit sample, keeping G fractional guard bits.
  function automatic wcplx_t widen(cplx_t x, int g);
    wcplx_t w;
    w.re = WW'(x.re) <<< g;
    w.im = WW'(x.im) <<< g;
    return w;
  endfunction

  function automatic wcplx_t wadd(wcplx_t a, wcplx_t b);
    wcplx_t w;
    w.re = a.re + b.re;
    w.im = a.im + b.im;
    return w;
  endfunction

  function automatic wcplx_t wsub(wcplx_t a, wcplx_t b);
    wcplx_t w;
    w.re = a.re - b.re;
    w.im = a.im - b.im;
    return w;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic wcplx_t wmul_mj(wcplx_t a);
    wcplx_t w;
    w.re = a.im;
    w.im = -a.re;
    return w;
  endfunction

  // Multiply by 1/sqrt(2), rounded (46341 / 65536).
  function automatic logic signed [WW-1:0] wmul_rsqrt2(logic signed [WW-1:0] v);
    logic signed [WW+17:0] p;
    p = (WW+18)'(v) * (WW+18)'(46341);
    p = p + (WW+18)'(32768);
    return WW'(p >>> 16);
  endfunction

  // Multiply by W8^1 = (1 - j)/sqrt(2).
  function automatic wcplx_t wmul_w8_1(wcplx_t a);
    wcplx_t w;
    w.re = wmul_rsqrt2(a.re + a.im);
    w.im = wmul_rsqrt2(a.im - a.re);
    return w;
  endfunction

  // Multiply by W8^3 = -(1 + j)/sqrt(2).
  function automatic wcplx_t wmul_w8_3(wcplx_t a);
    wcplx_t w;
    w.re = wmul_rsqrt2(a.im - a.re);
    w.im = wmul_rsqrt2(-a.re - a.im);
    return w;
  endfunction

  // Saturate a wide value to DW bits.
  function automatic logic signed [DW-1:0] sat(logic signed [WW-1:0] v);
    if (v > WW'(32767))       return 16'sh7fff;
    else if (v < -WW'(32768)) return 16'sh8000;
    else                      return DW'(v);
  endfunction

  // Divide by 2^sh with round-half-up, then saturate to DW bits.
  function automatic cplx_t narrow(wcplx_t a, int sh);
    cplx_t y;
    logic signed [WW-1:0] half;
    half = WW'(1) <<< (sh - 1);
    y.re = sat((a.re + half) >>> sh);
    y.im = sat((a.im + half) >>> sh);
    return y;
  endfunction

  // Exchange real and imaginary parts (used to run the FFT as an IFFT).
  function automatic cplx_t swap_ri(cplx_t a);
    cplx_t y;
    y.re = a.im;
    y.im = a.re;
    return y;
  endfunction

endpackage
