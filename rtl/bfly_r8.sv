// bfly_r8: radix-8 butterfly, combinational.
//
// y(k) = (1/8) * sum_n x(n) * W8^(n*k), with W8 = exp(-j*2*pi/8). It is built
// as three radix-2 layers (radix-2^3): the first layer forms u(n) = x(n) +
// x(n+4) and v(n) = (x(n) - x(n+4)) * W8^n; radix-4 butterflies on u and v
// give the even and the odd outputs. W8^1 and W8^3 need a multiplication by
// 1/sqrt(2), done with a 16-bit constant; three extra fractional bits are
// kept through the unit so that this rounding stays below one output LSB.
// The result is divided by 8 with rounding and saturation. Stages 4 to 6 use
// this unit. The internal decomposition is this design's choice.
module bfly_r8
  import fft_pkg::*;
(
  input  cplx_t x [8],
  output cplx_t y [8]
);
  localparam int G = 3;   // guard bits
  wcplx_t u [4];
  wcplx_t v [4];
  wcplx_t ua0, ua1, ub0, ub1, va0, va1, vb0, vb1;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      u[n] = wadd(widen(x[n], G), widen(x[n+4], G));
      v[n] = wsub(widen(x[n], G), widen(x[n+4], G));
    end
    v[1] = wmul_w8_1(v[1]);
    v[2] = wmul_mj(v[2]);
    v[3] = wmul_w8_3(v[3]);
    // radix-4 on u -> y0, y2, y4, y6
    ua0 = wadd(u[0], u[2]);
    ua1 = wadd(u[1], u[3]);
    ub0 = wsub(u[0], u[2]);
    ub1 = wmul_mj(wsub(u[1], u[3]));
    y[0] = narrow(wadd(ua0, ua1), 3 + G);
    y[4] = narrow(wsub(ua0, ua1), 3 + G);
    y[2] = narrow(wadd(ub0, ub1), 3 + G);
    y[6] = narrow(wsub(ub0, ub1), 3 + G);
    // radix-4 on v -> y1, y3, y5, y7
    va0 = wadd(v[0], v[2]);
    va1 = wadd(v[1], v[3]);
    vb0 = wsub(v[0], v[2]);
    vb1 = wmul_mj(wsub(v[1], v[3]));
    y[1] = narrow(wadd(va0, va1), 3 + G);
    y[5] = narrow(wsub(va0, va1), 3 + G);
    y[3] = narrow(wadd(vb0, vb1), 3 + G);
    y[7] = narrow(wsub(vb0, vb1), 3 + G);
  end
endmodule
