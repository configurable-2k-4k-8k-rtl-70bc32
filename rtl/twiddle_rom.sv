// twiddle_rom: twiddle factor W_NS^e = exp(-j*2*pi*e/NS) for the stage whose
// butterfly spans NS points.
//
// Only a quarter-wave cosine table C(m) = round(32767*cos(2*pi*m/NS)),
// m = 0..NS/4, is stored; it is computed at elaboration by a constant
// function. The quadrant of e selects signs and whether C(m) or C(NS/4-m)
// (the sine) feeds each part. Output is Q1.15 (cos 0 = 32767). The flag one
// is high when e = 0, i.e. when the twiddle factor is exactly 1; the
// multiplier then passes its input unchanged ("TW one"). Combinational.
// The twiddle factors themselves follow from the DFT decomposition; the
// quarter-wave table and the Q1.15 format are this design's choice.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int NS = 8192
) (
  input  logic [$clog2(NS)-1:0] e,
  output cplx_t                 w,
  output logic                  one
);
  localparam int Q  = NS / 4;
  localparam int QW = $clog2(Q);
  typedef logic signed [DW-1:0] tab_t [Q+1];

  function automatic tab_t gen_cos();
    tab_t t;
    for (int m = 0; m <= Q; m++)
      t[m] = DW'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979323846 * m / NS) + 0.5)));
    return t;
  endfunction

  localparam tab_t COS_TAB = gen_cos();

  logic [1:0]           quad;
  logic [QW-1:0]        m;
  logic signed [DW-1:0] c, s;

  always_comb begin
    quad = e[$clog2(NS)-1 -: 2];
    m    = e[QW-1:0];
    c    = COS_TAB[int'(m)];
    s    = COS_TAB[Q - int'(m)];
    // cos(theta) and sin(theta) for theta = quad*pi/2 + phi; W = cos - j sin
    unique case (quad)
      2'd0: begin w.re =  c; w.im = -s; end
      2'd1: begin w.re = -s; w.im = -c; end
      2'd2: begin w.re = -c; w.im =  s; end
      default: begin w.re = s; w.im = c; end
    endcase
    one = (e == '0);
  end
endmodule
