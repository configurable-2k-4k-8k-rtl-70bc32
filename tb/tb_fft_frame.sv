// tb_fft_frame: the core at its default size modulating whole OFDM frames.
//
// For each mode (2k, 4k, 8k) one DVB frame of 68 symbols is sent through the
// core as IFFT, back to back with no gap; each carrier holds a random QPSK
// value (+-9000 per part) and a few carriers a boosted pilot (+-24000). The
// output of every symbol is compared with a double-precision radix-2 inverse
// FFT computed here, x(n) = (1/N) sum X(k) exp(+j*2*pi*n*k/N), within 3 LSB
// plus |x|/4096 per part. The test also checks that the 68*N outputs of a
// frame leave without a single idle cycle (one sample per clock), that each
// frame yields exactly 68 symbols, and that the change of mode between
// frames (which drains the pipeline) happened.
`timescale 1ns/1ps
module tb_fft_frame;
  import fft_pkg::*;

  localparam int NSYM = 68;
  localparam int TOL = 3;
  localparam int RING = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, headin = 1'b0, inverse = 1'b1;
  fft_mode_e mode = MODE_2K;
  cplx_t din = '0;
  logic in_ready, out_valid, headout;
  logic [LOG2_NMAX-1:0] out_index;
  cplx_t dout;

  fft_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, maxerr = 0, n_drain = 0;
  real in_re [RING][NMAX], in_im [RING][NMAX];
  real got_re [NMAX], got_im [NMAX];
  int  sent = 0, osym = 0, ocnt = 0, n_cur = 2048;

  // in-place iterative radix-2 FFT of length n; sgn = +1 for the inverse
  task automatic ref_fft(inout real re [NMAX], inout real im [NMAX], input int n, input real sgn);
    int lg = $clog2(n);
    for (int a = 0; a < n; a++) begin
      int b = 0;
      for (int t = 0; t < lg; t++) if (a & (1 << t)) b |= 1 << (lg - 1 - t);
      if (b > a) begin
        real tr = re[a], ti = im[a];
        re[a] = re[b]; im[a] = im[b]; re[b] = tr; im[b] = ti;
      end
    end
    for (int len = 2; len <= n; len *= 2)
      for (int s = 0; s < n; s += len)
        for (int j = 0; j < len / 2; j++) begin
          real c = $cos(2.0 * PI * j / len), sn = sgn * $sin(2.0 * PI * j / len);
          real ur = re[s+j], ui = im[s+j];
          real vr = re[s+j+len/2] * c - im[s+j+len/2] * sn;
          real vi = re[s+j+len/2] * sn + im[s+j+len/2] * c;
          re[s+j] = ur + vr; im[s+j] = ui + vi;
          re[s+j+len/2] = ur - vr; im[s+j+len/2] = ui - vi;
        end
  endtask

  task automatic check_symbol(int s, int n);
    real rr [NMAX], ri [NMAX];
    int bad = 0;
    for (int k = 0; k < n; k++) begin rr[k] = in_re[s % RING][k]; ri[k] = in_im[s % RING][k]; end
    ref_fft(rr, ri, n, 1.0);
    for (int k = 0; k < n; k++) begin
      real xr = rr[k] / n, xi = ri[k] / n;
      real er = got_re[k] - xr, ei = got_im[k] - xi;
      real tol = TOL + $sqrt(xr * xr + xi * xi) / 4096.0;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      checks++;
      if (er > tol || ei > tol) begin
        failures++;
        if (bad++ < 3) $display("MISMATCH symbol %0d n %0d got (%0.0f,%0.0f) expected (%0.2f,%0.2f)",
                                s, k, got_re[k], got_im[k], xr, xi);
      end
    end
  endtask

  // output side: collect, check, and watch for gaps inside a frame
  int frame_out = 0, gaps = 0;
  logic in_frame = 1'b0;
  always @(posedge clk) begin
    if (in_frame && !out_valid) gaps++;
    if (out_valid && rst_n) begin
      if (headout) ocnt = 0;
      got_re[ocnt] = real'(dout.re);
      got_im[ocnt] = real'(dout.im);
      ocnt++;
      if (ocnt == n_cur) begin
        check_symbol(osym, n_cur);
        osym++;
        frame_out++;
        ocnt = 0;
      end
    end
    in_frame = out_valid && (frame_out % NSYM != 0 || ocnt != 0);
  end

  task automatic send_frame(fft_mode_e m);
    int n;
    n = mode_points(m);
    for (int s = 0; s < NSYM; s++) begin
      // do not overrun the reference ring
      while (sent - osym >= RING - 2) @(negedge clk);
      for (int k = 0; k < n; k++) begin
        real v;
        v = (k % 48 == 3) ? 24000.0 : 9000.0;
        in_re[sent % RING][k] = $urandom_range(0, 1) ? v : -v;
        in_im[sent % RING][k] = $urandom_range(0, 1) ? v : -v;
        @(negedge clk);
        in_valid = 1'b1; headin = (k == 0); mode = m; inverse = 1'b1;
        din.re = DW'($rtoi(in_re[sent % RING][k]));
        din.im = DW'($rtoi(in_im[sent % RING][k]));
        #1;
        while (!in_ready) begin
          if (k == 0) n_drain++;
          @(negedge clk);
          #1;
        end
      end
      sent++;
    end
  endtask

  initial begin
    fft_mode_e modes [3] = '{MODE_2K, MODE_4K, MODE_8K};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (modes[i]) begin
      send_frame(modes[i]);
      // a head in the next mode: the core drains this frame first
      @(negedge clk);
      in_valid = 1'b1; headin = 1'b1; inverse = 1'b1;
      mode = (i < 2) ? modes[i+1] : MODE_2K;
      #1;
      while (!in_ready) begin n_drain++; @(negedge clk); #1; end
      wait (osym == sent);
      checks++;
      if (frame_out != NSYM) begin
        failures++;
        $display("FAIL mode %0d: %0d symbols out", modes[i], frame_out);
      end
      $display("frame in %0d-point mode: %0d symbols, max error %0d LSB, idle output cycles %0d",
               mode_points(modes[i]), frame_out, maxerr, gaps);
      frame_out = 0;
      if (i < 2) n_cur = mode_points(modes[i+1]);
    end
    checks += 2;
    if (gaps != 0) begin failures++; $display("FAIL %0d idle cycles inside frames", gaps); end
    if (n_drain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
