// fft_core: configurable 2k/4k/8k-point FFT/IFFT core for DVB-T/DVB-H OFDM.
//
// One 8192-point decimation-in-frequency pipeline serves all three sizes.
// 8192 = 2*2*4*8*8*8: stage 1 and 2 are radix-2, stage 3 radix-4 and stages
// 4-6 radix-8, each a single-path delay-feedback (SDF) stage with R-1 FIFOs
// of length L (L = 4096, 2048, 512, 64, 8, 1). A 4k transform is the 8k one
// with stage 1 bypassed, a 2k transform the 8k one with stages 1 and 2
// bypassed: the remaining stages keep their own twiddle factors, so the
// shorter transforms take N clocks per symbol instead of the 8192 that
// zero padding to 8k would take. The reorder buffer puts the digit-reversed
// results in natural order. An IFFT is computed by exchanging the real and
// imaginary parts of the input and of the output.
//
// Scaling: every butterfly divides by its radix, so the forward transform
// delivers X(k)/N and the inverse delivers x(n) = (1/N) sum X(k) W^-nk.
//
// Interface: samples (2 x 16 bit) enter with in_valid/in_ready; headin marks
// the first sample of a symbol, and mode/inverse are sampled with it. A
// symbol is N samples; symbols may follow back to back and in_valid may drop
// at any time (the whole pipeline then stalls). A head with a new mode or
// direction makes the core drain the previous symbols first (in_ready low).
// Results leave in natural order with out_valid, headout on index 0 and
// out_index giving the frequency (FFT) or time (IFFT) index. A symbol starts
// to leave P + N accepted beats after its head, P being the pipeline latency
// (8203 / 4105 / 2055 beats in 8k / 4k / 2k mode); the controller supplies
// the beats for the last symbols while it drains.
module fft_core
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 headin,
  input  fft_mode_e            mode,
  input  logic                 inverse,
  input  cplx_t                din,
  output logic                 out_valid,
  output logic                 headout,
  output logic [LOG2_NMAX-1:0] out_index,
  output cplx_t                dout
);
  localparam int NST = 6;
  localparam int RADIX [NST] = '{2, 2, 4, 8, 8, 8};
  localparam int FLEN  [NST] = '{4096, 2048, 512, 64, 8, 1};

  logic      beat, drain, head_beat, cur_inv;
  fft_mode_e cur_mode;
  logic [5:0] stage_use;

  fft_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .headin    (headin),
    .mode_in   (mode),
    .inverse_in(inverse),
    .in_ready  (in_ready),
    .beat      (beat),
    .drain     (drain),
    .head_beat (head_beat),
    .mode      (cur_mode),
    .inverse   (cur_inv),
    .stage_use (stage_use)
  );

  // pipeline input after the IFFT exchange; zeros while draining
  cplx_t in_d;
  always_comb begin
    if (drain)        in_d = '0;
    else if (cur_inv) in_d = swap_ri(din);
    else              in_d = din;
  end

  for (genvar s = 0; s < NST; s++) begin : g_stage
    cplx_t d_in, d_st, d_out;
    logic  h_in, h_st, h_out;
    if (s == 0) begin : g_first
      assign d_in = in_d;
      assign h_in = head_beat;
    end else begin : g_next
      assign d_in = g_stage[s-1].d_out;
      assign h_in = g_stage[s-1].h_out;
    end
    sdf_stage #(.R(RADIX[s]), .L(FLEN[s]), .TW(s < NST - 1)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (beat && stage_use[s]),
      .head_in (h_in),
      .din     (d_in),
      .head_out(h_st),
      .dout    (d_st)
    );
    // bypass of a stage the mode does not use
    assign d_out = stage_use[s] ? d_st : d_in;
    assign h_out = stage_use[s] ? h_st : h_in;
  end

  // undo the IFFT exchange before the reorder buffer, where the direction
  // of the symbol is still the one in effect
  cplx_t ro_in;
  assign ro_in = cur_inv ? swap_ri(g_stage[NST-1].d_out) : g_stage[NST-1].d_out;

  reorder u_reorder (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (beat),
    .mode     (cur_mode),
    .head_in  (g_stage[NST-1].h_out),
    .din      (ro_in),
    .out_valid(out_valid),
    .head_out (headout),
    .out_index(out_index),
    .dout     (dout)
  );
endmodule
