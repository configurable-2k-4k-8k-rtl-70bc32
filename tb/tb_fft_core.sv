// tb_fft_core: end-to-end test of the 2k/4k/8k FFT/IFFT core at its default
// (full) size.
//
// A sequence of symbols is pushed through the core: two 8k FFT symbols back
// to back (the second with random input stalls), one 8k IFFT (a change of
// direction, so the core drains), two 4k FFT symbols back to back (stage 1
// bypassed), two 2k IFFT symbols (stages 1 and 2 bypassed) and one more 8k
// FFT. Every output symbol is compared with a double-precision DFT computed
// here (X(k)/N for the FFT, (1/N) sum X(k) W^-nk for the IFFT); each real and
// imaginary part must be within TOL LSB plus |X|/4096 (the gain error of
// Q1.15 twiddle factors, whose largest value is 32767/32768). The testbench also checks the
// latency from an accepted head to headout (P + N cycles without
// stalls, P the sum of (R-1)*L + 2 over the stages in use), that a back-to-
// back symbol follows its predecessor after exactly N cycles, that outputs
// come in natural order, and that every mechanism (stall, drain, bypass of
// one and of two stages, inverse, back to back) occurred.
`timescale 1ns/1ps
module tb_fft_core;
  import fft_pkg::*;

  localparam int TOL = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, headin = 1'b0, inverse = 1'b0;
  fft_mode_e mode = MODE_8K;
  cplx_t din = '0;
  logic in_ready, out_valid, headout;
  logic [LOG2_NMAX-1:0] out_index;
  cplx_t dout;

  fft_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_stall = 0, n_drain = 0, n_byp1 = 0, n_byp2 = 0, n_inv = 0, n_b2b = 0, n_sym_out = 0;

  // expected symbols, in order
  typedef struct {
    fft_mode_e m;
    logic      inv;
    int        n;
    longint    head_cyc;
    int        stalls_at_head;
    logic      b2b;       // follows the previous symbol directly
  } sym_t;
  sym_t syms [16];
  real  in_re [16][NMAX];
  real  in_im [16][NMAX];
  int   nsym = 0;

  real cos_t [NMAX], sin_t [NMAX];
  initial
    for (int i = 0; i < NMAX; i++) begin
      cos_t[i] = $cos(2.0 * PI * i / NMAX);
      sin_t[i] = $sin(2.0 * PI * i / NMAX);
    end

  function automatic int pipe_lat(fft_mode_e m);
    int p = 0;
    int rad [6] = '{2, 2, 4, 8, 8, 8};
    int len [6] = '{4096, 2048, 512, 64, 8, 1};
    int first = (m == MODE_8K) ? 0 : (m == MODE_4K) ? 1 : 2;
    for (int s = first; s < 6; s++) p += (rad[s] - 1) * len[s] + 2;
    return p;
  endfunction

  // ---------------- driver ----------------
  logic stall_en = 1'b0;

  task automatic put(input cplx_t v, input logic h, input fft_mode_e m, input logic inv,
                     output longint acc_cyc);
    logic acc;
    do begin
      @(negedge clk);
      if (stall_en && ($urandom_range(0, 7) == 0)) begin
        in_valid = 1'b0;
        n_stall++;
        acc = 1'b0;
      end else begin
        in_valid = 1'b1;
        din = v; headin = h; mode = m; inverse = inv;
        #1 acc = in_ready;
        if (!acc && h) n_drain++;
      end
    end while (!acc);
    acc_cyc = cyc + 1;
  endtask

  task automatic send_symbol(input fft_mode_e m, input logic inv, input logic stalls,
                             input logic b2b, input int tone_bin);
    int n = mode_points(m);
    longint c0, c;
    int idx = nsym;
    stall_en = stalls;
    syms[idx].m = m; syms[idx].inv = inv; syms[idx].n = n;
     syms[idx].b2b = b2b;
    nsym++;
    for (int i = 0; i < n; i++) begin
      cplx_t v;
      real re, im;
      if (!inv) begin
        re = real'($urandom_range(0, 12000)) - 6000.0;
        im = real'($urandom_range(0, 12000)) - 6000.0;
        re = $floor(re + 16000.0 * $cos(2.0 * PI * tone_bin * i / n) + 0.5);
        im = $floor(im + 16000.0 * $sin(2.0 * PI * tone_bin * i / n) + 0.5);
      end else begin
        re = $urandom_range(0, 1) ? 9000.0 : -9000.0;
        im = $urandom_range(0, 1) ? 9000.0 : -9000.0;
        if (i == tone_bin) re = 30000.0;
      end
      in_re[idx][i] = re; in_im[idx][i] = im;
      v.re = DW'($rtoi(re)); v.im = DW'($rtoi(im));
      put(v, i == 0, m, inv, c);
      if (i == 0) begin
        c0 = c;
        syms[idx].stalls_at_head = n_stall;
      end
    end
    syms[idx].head_cyc = c0;
    stall_en = 1'b0;
  endtask

  // ---------------- monitor ----------------
  int   osym = 0, ocnt = 0, maxerr = 0;
  longint last_head_cyc = 0;
  real  got_re [NMAX], got_im [NMAX];

  task automatic check_symbol(int s);
    int n = syms[s].n;
    int step = NMAX / n;
    real sg = syms[s].inv ? -1.0 : 1.0;
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      real xr = 0.0, xi = 0.0, er, ei;
      for (int t = 0; t < n; t++) begin
        int a = ((k * t) % n) * step;
        // x * exp(-/+ j 2 pi a / NMAX)
        xr += in_re[s][t] * cos_t[a] + sg * in_im[s][t] * sin_t[a];
        xi += in_im[s][t] * cos_t[a] - sg * in_re[s][t] * sin_t[a];
      end
      xr /= n; xi /= n;
      er = got_re[k] - xr; ei = got_im[k] - xi;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      checks++;
      // TOL LSB of rounding, plus the relative error of Q1.15 twiddles
      if (er > TOL + $sqrt(xr * xr + xi * xi) / 4096.0 ||
          ei > TOL + $sqrt(xr * xr + xi * xi) / 4096.0) begin
        failures++;
        if (bad++ < 5)
          $display("MISMATCH sym %0d k %0d got (%0.0f,%0.0f) exp (%0.2f,%0.2f)",
                   s, k, got_re[k], got_im[k], xr, xi);
      end
    end
    $display("symbol %0d (%0d points, %s) checked, max error so far %0d LSB",
             s, n, syms[s].inv ? "IFFT" : "FFT", maxerr);
  endtask

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      if (headout) begin
        ocnt = 0;
        checks++;
        if (osym >= nsym) begin
          failures++;
          $display("FAIL unexpected output symbol");
        end else if ((n_stall == syms[osym].stalls_at_head) && (cyc - syms[osym].head_cyc) !=
                     longint'(pipe_lat(syms[osym].m) + syms[osym].n)) begin
          failures++;
          $display("FAIL latency of symbol %0d: %0d cycles, expected %0d", osym,
                   cyc - syms[osym].head_cyc, pipe_lat(syms[osym].m) + syms[osym].n);
        end
        if (osym > 0 && osym < nsym && syms[osym].b2b && n_stall == syms[osym].stalls_at_head) begin
          checks++;
          n_b2b++;
          if (cyc - last_head_cyc != longint'(syms[osym].n)) begin
            failures++;
            $display("FAIL symbol %0d follows after %0d cycles", osym, cyc - last_head_cyc);
          end
        end
        last_head_cyc = cyc;
      end
      if (osym < nsym) begin
        if (int'(out_index) != ocnt) begin
          failures++;
          $display("FAIL out_index %0d expected %0d", out_index, ocnt);
        end
        got_re[ocnt] = real'(dout.re);
        got_im[ocnt] = real'(dout.im);
        ocnt++;
        if (ocnt == syms[osym].n) begin
          if (syms[osym].m == MODE_4K) n_byp1++;
          if (syms[osym].m == MODE_2K) n_byp2++;
          if (syms[osym].inv) n_inv++;
          check_symbol(osym);
          osym++;
          n_sym_out++;
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    longint dummy;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_symbol(MODE_8K, 1'b0, 1'b0, 1'b0, 37);
    send_symbol(MODE_8K, 1'b0, 1'b1, 1'b0, 1000);
    send_symbol(MODE_8K, 1'b1, 1'b0, 1'b0, 5);
    send_symbol(MODE_4K, 1'b0, 1'b0, 1'b0, 300);
    send_symbol(MODE_4K, 1'b0, 1'b0, 1'b1, 4000);
    send_symbol(MODE_2K, 1'b1, 1'b0, 1'b0, 17);
    send_symbol(MODE_2K, 1'b1, 1'b0, 1'b1, 2000);
    send_symbol(MODE_8K, 1'b0, 1'b0, 1'b0, 8191);
    // a head with a new configuration makes the core flush the last symbol
    put('0, 1'b1, MODE_2K, 1'b0, dummy);
    @(negedge clk);
    in_valid = 1'b0;
    headin = 1'b0;
    wait (osym == nsym);
    repeat (5) @(posedge clk);
    $display("mechanisms: stall=%0d drain=%0d bypass1=%0d bypass2=%0d inverse=%0d back_to_back=%0d",
             n_stall, n_drain, n_byp1, n_byp2, n_inv, n_b2b);
    checks += 6;
    if (n_stall == 0) failures++;
    if (n_drain == 0) failures++;
    if (n_byp1 == 0) failures++;
    if (n_byp2 == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_b2b == 0) failures++;
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d of %0d symbols out", osym, nsym);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
