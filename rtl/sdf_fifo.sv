// sdf_fifo: one feedback buffer of a single-path delay-feedback (SDF) stage.
//
// A stage of radix R over blocks of R*L samples owns R-1 of these buffers,
// each L complex samples long. The buffer is a circular memory addressed by
// the position inside the current L-sample group: the stage reads a location
// and, in the same beat, overwrites it, so each buffer behaves as a FIFO of
// length L that advances only in the beats in which its stage selects it.
// Read is asynchronous (the value stored at addr), write takes effect at the
// clock edge when we is high. Contents are not reset; the pipeline marks the
// data as meaningful through its head tags.
// FIFO buffers of length N/R per SDF stage follow the original architecture;
// building them as addressed memories is this design's choice.
module sdf_fifo
  import fft_pkg::*;
#(
  parameter int L = 4096
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [(L > 1 ? $clog2(L) : 1)-1:0] addr,
  input  cplx_t                          wdata,
  output cplx_t                          rdata
);
  cplx_t mem [L];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
