// tb_bfly_r2: self-checking test of the radix-2 butterfly.
//
// Random complex inputs (and a few corner cases at full scale) are applied;
// every output is compared with (1/2) * sum_n x(n) * exp(-j*2*pi*n*k/2)
// computed in double precision. The rounding of the unit allows an error of
// at most 0.5 LSB per part.
`timescale 1ns/1ps
module tb_bfly_r2;
  import fft_pkg::*;
  localparam int R = 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 0.5 + 1e-9;

  cplx_t x [R];
  cplx_t y [R];
  int checks = 0, failures = 0;

  bfly_r2 dut (.x(x), .y(y));

  task automatic check();
    for (int k = 0; k < R; k++) begin
      real er = 0.0, ei = 0.0, dr, di;
      for (int n = 0; n < R; n++) begin
        real c = $cos(2.0 * PI * n * k / R), s = $sin(2.0 * PI * n * k / R);
        er += real'(x[n].re) * c + real'(x[n].im) * s;
        ei += real'(x[n].im) * c - real'(x[n].re) * s;
      end
      er /= R; ei /= R;
      // the expected value may exceed 16 bits only through saturation
      if (er > 32767.0) er = 32767.0;
      if (er < -32768.0) er = -32768.0;
      if (ei > 32767.0) ei = 32767.0;
      if (ei < -32768.0) ei = -32768.0;
      dr = real'(y[k].re) - er; di = real'(y[k].im) - ei;
      checks++;
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH k=%0d got (%0d,%0d) expected (%0.3f,%0.3f)", k, y[k].re, y[k].im, er, ei);
      end
    end
  endtask

  initial begin
    // corner cases: all at the positive and at the negative limit
    for (int n = 0; n < R; n++) begin x[n].re = 16'sh7fff; x[n].im = 16'sh8000; end
    #1 check();
    for (int n = 0; n < R; n++) begin x[n].re = (n % 2) ? 16'sh8000 : 16'sh7fff; x[n].im = 16'sh7fff; end
    #1 check();
    for (int t = 0; t < 3000; t++) begin
      for (int n = 0; n < R; n++) begin
        x[n].re = DW'($urandom_range(0, 40000)) - 16'sd20000;
        x[n].im = DW'($urandom_range(0, 40000)) - 16'sd20000;
      end
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
