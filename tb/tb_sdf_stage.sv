// tb_sdf_stage: self-checking test of the SDF stage in four configurations:
// the default (radix-2, L = 4096, i.e. pipeline stage 1), radix-4 with L = 16,
// radix-8 with L = 8 and radix-8 with L = 1 and no twiddle multiplier (the
// shape of the last pipeline stage).
//
// All four get the same random input stream with random stall cycles (en
// low) and a head on the first sample. Two 8192-sample stretches are sent,
// so the default stage sees two blocks and the small ones many. The output
// of each beat is compared with the DIF stage equation computed in double
// precision: output k*L + i of a block is
//   (1/R) * sum_p x(p*L + i) * exp(-j*2*pi*p*k/R) * exp(-j*2*pi*k*i/(R*L)),
// within 1.5 LSB plus |y|/8192 (gain error of the Q1.15 twiddle factors). The head must come out (R-1)*L + 2 beats after it went in.
`timescale 1ns/1ps
module tb_sdf_stage;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NIN = 16384;               // samples with data
  localparam int NBEAT = NIN + 4096 + 8;    // plus flush
  localparam int NCFG = 4;
  localparam int RS [NCFG] = '{2, 4, 8, 8};
  localparam int LS [NCFG] = '{4096, 16, 8, 1};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, head_in = 1'b0;
  cplx_t din = '0;
  int checks = 0, failures = 0;

  real xr [NBEAT], xi [NBEAT];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int R = RS[c], L = LS[c], NS = R * L;
    logic  head_out;
    cplx_t dout;
    real   yr [NBEAT], yi [NBEAT];
    int    nout = 0, h0 = -1;

    if (c == 0) begin : g_dflt
      sdf_stage dut (.clk, .rst_n, .en, .head_in, .din, .head_out, .dout);
    end else begin : g_par
      sdf_stage #(.R(R), .L(L), .TW(c != 3)) dut (.clk, .rst_n, .en, .head_in, .din, .head_out, .dout);
    end

    // the registered output of beat m is seen at beat m+1
    always @(posedge clk)
      if (en && rst_n) begin
        if (head_out && h0 < 0) h0 = nout;
        yr[nout] = real'(dout.re);
        yi[nout] = real'(dout.im);
        nout++;
      end

    task automatic check();
      int bad = 0;
      checks++;
      if (h0 - 1 != (R - 1) * L + 2 - 1) begin
        failures++;
        $display("FAIL R=%0d L=%0d head latency %0d beats", R, L, h0);
      end
      for (int q = 0; q + h0 < nout && q < NIN; q++) begin
        int b = q / NS, k = (q % NS) / L, i = q % L;
        real er = 0.0, ei = 0.0, tr, ti, a, dr, di, tol;
        for (int p = 0; p < R; p++) begin
          a = 2.0 * PI * p * k / R;
          er += xr[b*NS + p*L + i] * $cos(a) + xi[b*NS + p*L + i] * $sin(a);
          ei += xi[b*NS + p*L + i] * $cos(a) - xr[b*NS + p*L + i] * $sin(a);
        end
        er /= R; ei /= R;
        if (c != 3) begin
          a = 2.0 * PI * k * i / NS;
          tr = er * $cos(a) + ei * $sin(a);
          ti = ei * $cos(a) - er * $sin(a);
          er = tr; ei = ti;
        end
        dr = yr[q + h0] - er; di = yi[q + h0] - ei;
        checks++;
        tol = 1.5 + $sqrt(er * er + ei * ei) / 8192.0;
        if (dr > tol || dr < -tol || di > tol || di < -tol) begin
          failures++;
          if (bad++ < 5) $display("MISMATCH R=%0d L=%0d q=%0d got (%0.0f,%0.0f) expected (%0.2f,%0.2f)",
                                  R, L, q, yr[q+h0], yi[q+h0], er, ei);
        end
      end
    endtask
  end

  int n_stall = 0;

  initial begin
    for (int m = 0; m < NBEAT; m++) begin
      xr[m] = (m < NIN) ? real'($urandom_range(0, 40000)) - 20000.0 : 0.0;
      xi[m] = (m < NIN) ? real'($urandom_range(0, 40000)) - 20000.0 : 0.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NBEAT; m++) begin
      @(negedge clk);
      while ($urandom_range(0, 9) == 0) begin
        en = 1'b0;
        n_stall++;
        @(negedge clk);
      end
      en = 1'b1;
      head_in = (m == 0);
      din.re = DW'($rtoi(xr[m]));
      din.im = DW'($rtoi(xi[m]));
    end
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    g_cfg[0].check();
    g_cfg[1].check();
    g_cfg[2].check();
    g_cfg[3].check();
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
