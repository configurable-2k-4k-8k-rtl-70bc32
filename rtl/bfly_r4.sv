// bfly_r4: radix-4 butterfly, combinational.
//
// y(k) = (1/4) * sum_n x(n) * (-j)^(n*k), for n, k = 0..3, computed as two
// layers of radix-2 additions with one multiplication by -j (an exchange of
// real and imaginary parts). The result is divided by 4 with rounding and
// saturation. Used by stage 3.
// The radix follows the stage plan of the core; the internal structure and
// the scaling are this design's choice.
module bfly_r4
  import fft_pkg::*;
(
  input  cplx_t x [4],
  output cplx_t y [4]
);
  wcplx_t a0, a1, b0, b1;
  always_comb begin
    a0 = wadd(widen(x[0], 0), widen(x[2], 0));
    a1 = wadd(widen(x[1], 0), widen(x[3], 0));
    b0 = wsub(widen(x[0], 0), widen(x[2], 0));
    b1 = wmul_mj(wsub(widen(x[1], 0), widen(x[3], 0)));
    y[0] = narrow(wadd(a0, a1), 2);
    y[2] = narrow(wsub(a0, a1), 2);
    y[1] = narrow(wadd(b0, b1), 2);
    y[3] = narrow(wsub(b0, b1), 2);
  end
endmodule
