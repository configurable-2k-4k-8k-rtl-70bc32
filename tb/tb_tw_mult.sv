// tb_tw_mult: self-checking test of the twiddle multiplier and its "TW one"
// bypass.
//
// Random samples (small enough that the product cannot saturate) are
// multiplied by random unit-magnitude Q1.15 factors; the
// registered result (one cycle later, only when en is high) must be within
// one LSB of x*w/32768. With one high the sample must come out unchanged;
// with en low the output must hold.
`timescale 1ns/1ps
module tb_tw_mult;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, en = 1'b0, one = 1'b0;
  cplx_t x = '0, w = '0, y;
  int checks = 0, failures = 0;
  int n_one = 0, n_hold = 0;

  tw_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    cplx_t prev;
    for (int t = 0; t < 5000; t++) begin
      real a, er, ei, dr, di;
      logic was_en, was_one;
      @(negedge clk);
      prev = y;
      a = 2.0 * PI * real'($urandom_range(0, 8191)) / 8192.0;
      x.re = DW'($urandom_range(0, 44000)) - 16'sd22000;
      x.im = DW'($urandom_range(0, 44000)) - 16'sd22000;
      w.re = DW'($rtoi($floor(32767.0 * $cos(a) + 0.5)));
      w.im = DW'($rtoi($floor(-32767.0 * $sin(a) + 0.5)));
      one = ($urandom_range(0, 9) == 0);
      en  = ($urandom_range(0, 9) != 0);
      was_en = en; was_one = one;
      er = (real'(x.re) * real'(w.re) - real'(x.im) * real'(w.im)) / 32768.0;
      ei = (real'(x.re) * real'(w.im) + real'(x.im) * real'(w.re)) / 32768.0;
      @(negedge clk);
      checks++;
      if (!was_en) begin
        n_hold++;
        if (y !== prev) begin failures++; $display("FAIL output changed without en"); end
      end else if (was_one) begin
        n_one++;
        if (y !== x) begin failures++; $display("FAIL TW one bypass"); end
      end else begin
        dr = real'(y.re) - er; di = real'(y.im) - ei;
        if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
          failures++;
          if (failures < 10) $display("MISMATCH got (%0d,%0d) expected (%0.2f,%0.2f)", y.re, y.im, er, ei);
        end
      end
    end
    checks++;
    if (n_one == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
