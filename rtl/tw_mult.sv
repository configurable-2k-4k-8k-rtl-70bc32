// tw_mult: complex multiplication by the twiddle factor, with the "TW one"
// bypass, and one pipeline register.
//
// y = x * w, with x a 16-bit sample and w a Q1.15 twiddle factor: the four
// 32-bit partial products are combined, rounded at bit 15 and saturated to 16
// bits. When one is high the twiddle factor is exactly 1 (exponent 0) and x is
// registered unchanged, avoiding the error of multiplying by 32767/32768.
// The result is registered when en is high (one beat of latency).
// The TW-one bypass follows the original design; the rounding and
// saturation are this design's choice.
module tw_mult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  cplx_t x,
  input  cplx_t w,
  input  logic  one,
  output cplx_t y
);
  logic signed [2*DW:0] xr, xi, wr, wi, pr, pi;
  cplx_t prod;

  always_comb begin
    xr = (2*DW+1)'(x.re);
    xi = (2*DW+1)'(x.im);
    wr = (2*DW+1)'(w.re);
    wi = (2*DW+1)'(w.im);
    pr = xr * wr - xi * wi + (2*DW+1)'(1 << (DW-2));
    pi = xr * wi + xi * wr + (2*DW+1)'(1 << (DW-2));
    prod.re = sat(WW'(pr >>> (DW-1)));
    prod.im = sat(WW'(pi >>> (DW-1)));
  end

  always_ff @(posedge clk)
    if (en) y <= one ? x : prod;
endmodule
