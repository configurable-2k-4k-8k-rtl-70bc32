// reorder: turns the digit-reversed output of the last pipeline stage into
// natural frequency order.
//
// The pipeline delivers output q of a symbol (q = 0..N-1, in stream order)
// with q's radix digits in reverse significance. In 8k mode the stream index
// is q = 4096*k0 + 2048*k1 + 512*k2 + 64*k3 + 8*k4 + k5 while the natural
// index is k = k0 + 2*k1 + 4*k2 + 16*k3 + 128*k4 + 1024*k5; 4k mode drops k0
// and 2k mode drops k0 and k1. The module writes each sample at its natural
// index into one half of a double buffer (2 x 8192 words) while the other
// half, filled by the previous symbol, is read out in order 0..N-1. Both
// halves swap every N beats.
//
// Timing: one write and one read per beat (en high). A sample with head_in
// high is stream index 0 of a symbol; a symbol is read out during the N beats
// that follow its last input beat, with head_out on index 0 and out_valid
// high on every output beat. Only halves that began with a head are marked
// valid, so junk pushed through the pipeline while it drains is not output.
// mode must stay constant while a symbol is inside; the controller ensures it.
// The digit mapping follows the index decomposition of the transform; the
// double-buffer structure is this design's choice.
module reorder
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  fft_mode_e            mode,
  input  logic                 head_in,
  input  cplx_t                din,
  output logic                 out_valid,
  output logic                 head_out,
  output logic [LOG2_NMAX-1:0] out_index,
  output cplx_t                dout
);
  typedef logic [LOG2_NMAX-1:0] idx_t;

  cplx_t mem [2*NMAX];

  idx_t wcnt, wpos, waddr, rcnt, last;
  logic wbank, fill_valid, rd_active;

  // natural index of stream index q
  function automatic idx_t digit_rev(idx_t q, fft_mode_e m);
    idx_t k;
    k = '0;
    case (m)
      MODE_8K: begin
        k[0]     = q[12];
        k[1]     = q[11];
        k[3:2]   = q[10:9];
        k[6:4]   = q[8:6];
        k[9:7]   = q[5:3];
        k[12:10] = q[2:0];
      end
      MODE_4K: begin
        k[0]     = q[11];
        k[2:1]   = q[10:9];
        k[5:3]   = q[8:6];
        k[8:6]   = q[5:3];
        k[11:9]  = q[2:0];
      end
      default: begin
        k[1:0]   = q[10:9];
        k[4:2]   = q[8:6];
        k[7:5]   = q[5:3];
        k[10:8]  = q[2:0];
      end
    endcase
    return k;
  endfunction

  always_comb begin
    last  = idx_t'(mode_points(mode) - 1);
    wpos  = head_in ? '0 : wcnt;
    waddr = digit_rev(wpos, mode);
  end

  always_ff @(posedge clk)
    if (en) begin
      mem[{wbank, waddr}] <= din;
      if (rd_active) dout <= mem[{~wbank, rcnt}];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wcnt       <= '0;
      wbank      <= 1'b0;
      fill_valid <= 1'b0;
      rd_active  <= 1'b0;
      rcnt       <= '0;
      out_valid  <= 1'b0;
      head_out   <= 1'b0;
      out_index  <= '0;
    end else begin
      out_valid <= 1'b0;
      head_out  <= 1'b0;
      if (en) begin
        // read side: the half not being written
        if (rd_active) begin
          out_index <= rcnt;
          out_valid <= 1'b1;
          head_out  <= (rcnt == '0);
          rcnt      <= rcnt + idx_t'(1);
          if (rcnt == last) rd_active <= 1'b0;
        end
        // write side
        if (wpos == '0) fill_valid <= head_in;
        if (wpos == last) begin
          wcnt      <= '0;
          wbank     <= ~wbank;
          rd_active <= (wpos == '0) ? head_in : fill_valid;
          rcnt      <= '0;
        end else begin
          wcnt <= wpos + idx_t'(1);
        end
      end
    end

  // the size must not change while a symbol is being read out
  a_mode_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_active |=> $stable(mode) || !rd_active);
endmodule
