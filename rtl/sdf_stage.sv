// sdf_stage: one radix-R single-path delay-feedback (SDF) stage of the
// decimation-in-frequency pipeline.
//
// The stage works on blocks of NS = R*L samples. The position pos of an input
// sample in its block splits into a group p = pos / L (0..R-1) and an offset
// i = pos % L. The stage owns R-1 feedback FIFOs of length L (sdf_fifo):
//  - groups 0..R-2 (fill): the FIFO input selector writes the sample into
//    FIFO p, and the FIFO output selector sends out what FIFO p held, which is
//    butterfly output p+1 of the previous block;
//  - group R-1 (compute): the R-point butterfly takes the R-1 stored samples
//    and the incoming one; output 0 leaves the stage at once and outputs
//    1..R-1 are written back into the FIFOs.
// A sample leaving the stage as butterfly output k at offset i is multiplied
// by the twiddle factor W_NS^(k*i) (decimation in frequency); k = 0 always
// gives a factor of 1, which tw_mult passes through. The last stage (TW = 0)
// has no twiddle multiplier.
//
// Timing: the stage advances only in beats (en high). An input sample with
// head_in high starts a block at pos 0; the first output of that block,
// marked with head_out, appears (R-1)*L + 2 beats later (FIFO delay, one
// butterfly register, one multiplier register). After a head the position
// counter runs on by itself, so the following blocks of the same symbol and
// later symbols need no new head. Data between blocks is streamed at one
// sample per beat with no gaps.
// The SDF structure, the FIFO selectors and the TW-one bypass follow the
// original architecture; the pipeline registers and the stall input are
// this design's choice.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int R  = 2,      // radix: 2, 4 or 8
  parameter int L  = 4096,   // FIFO length; the stage spans R*L points
  parameter bit TW = 1'b1    // twiddle multiplier present
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  head_in,
  input  cplx_t din,
  output logic  head_out,
  output cplx_t dout
);
  localparam int NS = R * L;
  localparam int CW = $clog2(NS);
  localparam int AW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] cnt, pos;
  logic [2:0]    p;
  logic [AW-1:0] i;
  logic          blk_head;

  cplx_t rd [R-1];
  cplx_t wd [R-1];
  logic  we [R-1];
  cplx_t bx [R];
  cplx_t by [R];
  cplx_t bf_out;

  always_comb begin
    pos = head_in ? '0 : cnt;
    p   = 3'(pos / CW'(L));
    i   = AW'(pos % CW'(L));
  end

  // feedback FIFOs
  for (genvar j = 0; j < R - 1; j++) begin : g_fifo
    sdf_fifo #(.L(L)) u_fifo (
      .clk  (clk),
      .we   (we[j]),
      .addr (i),
      .wdata(wd[j]),
      .rdata(rd[j])
    );
  end

  // butterfly
  always_comb begin
    for (int j = 0; j < R - 1; j++) bx[j] = rd[j];
    bx[R-1] = din;
  end

  if (R == 2) begin : g_r2
    bfly_r2 u_bf (.x(bx), .y(by));
  end else if (R == 4) begin : g_r4
    bfly_r4 u_bf (.x(bx), .y(by));
  end else begin : g_r8
    bfly_r8 u_bf (.x(bx), .y(by));
  end

  // FIFO input selector and FIFO output selector
  always_comb begin
    for (int j = 0; j < R - 1; j++) begin
      we[j] = en && ((int'(p) == j) || (int'(p) == R - 1));
      wd[j] = (int'(p) == R - 1) ? by[j+1] : din;
    end
    if (int'(p) == R - 1) begin
      bf_out = by[0];
    end else begin
      bf_out = rd[0];
      for (int j = 1; j < R - 1; j++)
        if (int'(p) == j) bf_out = rd[j];
    end
  end

  // position counter and head tracking
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt      <= '0;
      blk_head <= 1'b0;
    end else if (en) begin
      cnt <= pos + CW'(1);
      if (head_in)
        blk_head <= 1'b1;
      else if (pos == CW'((R - 1) * L))
        blk_head <= 1'b0;
    end

  // butterfly output register
  cplx_t         s1_d;
  logic          s1_h, s2_h;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_h <= 1'b0;
      s2_h <= 1'b0;
    end else if (en) begin
      s1_h <= (pos == CW'((R - 1) * L)) && (blk_head || head_in);
      s2_h <= s1_h;
    end

  always_ff @(posedge clk)
    if (en) s1_d <= bf_out;

  // twiddle multiplication
  if (TW) begin : g_tw
    logic [2:0]    k_out;
    logic [CW-1:0] e, s1_e;
    cplx_t w;
    logic  one;
    // butterfly output index k of the sample leaving now, and k*i
    always_comb begin
      k_out = (int'(p) == R - 1) ? 3'd0 : p + 3'd1;
      e     = CW'(k_out) * CW'(i);
    end
    always_ff @(posedge clk)
      if (en) s1_e <= e;
    twiddle_rom #(.NS(NS)) u_rom (.e(s1_e), .w(w), .one(one));
    tw_mult u_mul (.clk(clk), .en(en), .x(s1_d), .w(w), .one(one), .y(dout));
  end else begin : g_notw
    // the last stage's outputs carry no twiddle factor
    always_ff @(posedge clk)
      if (en) dout <= s1_d;
  end

  assign head_out = s2_h;
endmodule
