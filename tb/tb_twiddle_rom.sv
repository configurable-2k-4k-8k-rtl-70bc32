// tb_twiddle_rom: self-checking test of the twiddle factor table.
//
// For every exponent e of the default 8192-point table, and of a 512-point
// table, the output must equal round(32767*cos(2*pi*e/NS)) and
// -round(32767*sin(2*pi*e/NS)) within one LSB, and the flag one must be high
// exactly for e = 0.
`timescale 1ns/1ps
module tb_twiddle_rom;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic [12:0] e8;
  logic [8:0]  e5;
  cplx_t w8, w5;
  logic one8, one5;
  int checks = 0, failures = 0;

  twiddle_rom dut8 (.e(e8), .w(w8), .one(one8));
  twiddle_rom #(.NS(512)) dut5 (.e(e5), .w(w5), .one(one5));

  task automatic chk(cplx_t w, logic one, int e, int ns);
    real c = 32767.0 * $cos(2.0 * PI * e / ns);
    real s = -32767.0 * $sin(2.0 * PI * e / ns);
    real dc = real'(w.re) - c, ds = real'(w.im) - s;
    checks++;
    if (dc > 1.0 || dc < -1.0 || ds > 1.0 || ds < -1.0 || one != (e == 0)) begin
      failures++;
      if (failures < 10) $display("MISMATCH NS=%0d e=%0d got (%0d,%0d,%0d) expected (%0.1f,%0.1f)",
                                  ns, e, w.re, w.im, one, c, s);
    end
  endtask

  initial begin
    for (int e = 0; e < 8192; e++) begin
      e8 = 13'(e); e5 = 9'(e % 512);
      #1;
      chk(w8, one8, e, 8192);
      if (e < 512) chk(w5, one5, e, 512);
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
