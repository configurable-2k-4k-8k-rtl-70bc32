// bfly_r2: radix-2 butterfly, combinational.
//
// y0 = (x0 + x1) / 2, y1 = (x0 - x1) / 2. Each butterfly of the pipeline
// divides its outputs by its radix, so that a whole transform is scaled by
// 1/N and the 16-bit output cannot overflow; the division rounds half up and
// saturates. The radix-2 stages (stages 1 and 2) use this unit. The scaling
// rule is this design's choice.
module bfly_r2
  import fft_pkg::*;
(
  input  cplx_t x [2],
  output cplx_t y [2]
);
  wcplx_t a, b;
  always_comb begin
    a = widen(x[0], 0);
    b = widen(x[1], 0);
    y[0] = narrow(wadd(a, b), 1);
    y[1] = narrow(wsub(a, b), 1);
  end
endmodule
