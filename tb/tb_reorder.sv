// tb_reorder: self-checking test of the output reorder buffer in all three
// modes.
//
// For each mode three symbols are written back to back in the pipeline's
// stream order q; the sample at q carries, as its real part, the natural
// index it belongs to, worked out here from the digit expansions
//   q = 4096*k0 + 2048*k1 + 512*k2 + 64*k3 + 8*k4 + k5   (8k mode)
//   k = k0 + 2*k1 + 4*k2 + 16*k3 + 128*k4 + 1024*k5
// (4k mode drops k0, 2k mode drops k0 and k1), and as its imaginary part the
// symbol number. The output must come in natural order (real part and
// out_index equal to the output count), belong to the right symbol, start
// with headout, and start exactly N beats after the symbol's head went in.
// One more symbol's worth of beats without a head flushes the last symbol and
// must produce no further output. Random stall cycles (en low) are mixed in.
`timescale 1ns/1ps
module tb_reorder;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, head_in = 1'b0;
  fft_mode_e mode = MODE_8K;
  cplx_t din = '0;
  logic out_valid, head_out;
  logic [LOG2_NMAX-1:0] out_index;
  cplx_t dout;
  int checks = 0, failures = 0;

  reorder dut (.*);

  always #5 clk = ~clk;

  function automatic int nat_index(int q, fft_mode_e m);
    int k0, k1, k2, k3, k4, k5;
    k5 = q % 8; k4 = (q / 8) % 8; k3 = (q / 64) % 8; k2 = (q / 512) % 4;
    k1 = (q / 2048) % 2; k0 = (q / 4096) % 2;
    case (m)
      MODE_8K: return k0 + 2*k1 + 4*k2 + 16*k3 + 128*k4 + 1024*k5;
      MODE_4K: return k1 + 2*k2 + 8*k3 + 64*k4 + 512*k5;
      default: return k2 + 4*k3 + 32*k4 + 256*k5;
    endcase
  endfunction

  int beat_no = 0, ocnt = 0, osym = 0, exp_syms = 0, head_beat_of [64];

  // output monitor: outputs are registered, seen one edge after their beat
  always @(posedge clk) begin
    if (en) beat_no <= beat_no + 1;
    if (out_valid && rst_n) begin
      int n;
      n = mode_points(mode);
      if (head_out) begin
        checks++;
        if (ocnt != 0) begin failures++; $display("FAIL headout in the middle of a symbol"); end
        ocnt = 0;
        // head entered at beat h; output index 0 is read at beat h + N
        if (beat_no - 1 != head_beat_of[osym] + n) begin
          failures++;
          $display("FAIL symbol %0d starts at beat %0d, head at %0d", osym, beat_no - 1, head_beat_of[osym]);
        end
      end
      checks++;
      if (osym >= exp_syms || int'(out_index) != ocnt || int'(dout.re) != ocnt ||
          int'(dout.im) != osym) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH sym %0d count %0d: index %0d data (%0d,%0d)", osym, ocnt, out_index, dout.re, dout.im);
      end
      ocnt++;
      if (ocnt == n) begin ocnt = 0; osym++; end
    end
  end

  task automatic beat(input cplx_t v, input logic h);
    @(negedge clk);
    while ($urandom_range(0, 15) == 0) begin
      en = 1'b0;
      @(negedge clk);
    end
    en = 1'b1; din = v; head_in = h;
  endtask

  initial begin
    fft_mode_e modes [3] = '{MODE_8K, MODE_2K, MODE_4K};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (modes[mi]) begin
      int n;
      n = mode_points(modes[mi]);
      mode = modes[mi];
      for (int s = 0; s < 3; s++) begin
        for (int q = 0; q < n; q++) begin
          cplx_t v;
          v.re = DW'(nat_index(q, mode));
          v.im = DW'(exp_syms);
          beat(v, q == 0);
          if (q == 0) begin
            @(posedge clk);
            head_beat_of[exp_syms] = beat_no;
          end
        end
        exp_syms++;
      end
      // flush: one symbol of beats without a head
      for (int q = 0; q < n + 2; q++) beat('0, 1'b0);
      @(negedge clk);
      en = 1'b0;
      repeat (3) @(negedge clk);
      checks++;
      if (osym != exp_syms || ocnt != 0) begin
        failures++;
        $display("FAIL mode %0d: %0d of %0d symbols out", mode, osym, exp_syms);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
