// fft_ctrl: control state machine of the FFT/IFFT core.
//
// IDLE: the core waits for a sample with headin high (the first sample of a
//   symbol); other samples are accepted and dropped. On a head it latches the
//   transform size (mode) and direction (inverse) and moves to RUN.
// RUN: every accepted sample is one beat of the pipeline. A head with the
//   same configuration simply starts the next symbol, back to back. A head
//   with a different configuration is held off (in_ready low) and the FSM
//   moves to DRAIN; that cycle is already the first drain beat, so the
//   output stream has no bubble.
// DRAIN: the pipeline is clocked with zero samples until the last symbol has
//   left the reorder buffer: P + N beats after that symbol's last sample,
//   where P is the pipeline latency of the stages in use and N the symbol
//   length; an incomplete symbol is padded to N first. Then IDLE accepts the
//   held head with its new configuration.
// stage_use selects the stages of the mode: stages 1-6 for 8k, 2-6 for 4k,
// 3-6 for 2k; the others are bypassed and not clocked.
// Handshake: a sample is taken in a cycle with in_valid and in_ready high;
// beat is high in cycles in which the pipeline advances.
// The idle state, the start on headin and the choice of stages per mode
// follow the original design; the valid/ready handshake and the drain on a
// configuration change are this design's own. Bits 5:2 of stage_use are
// always 1 (stages 3-6 serve every mode); they are kept for a uniform
// per-stage enable.
module fft_ctrl
  import fft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      headin,
  input  fft_mode_e mode_in,
  input  logic      inverse_in,
  output logic      in_ready,
  output logic      beat,
  output logic      drain,
  output logic      head_beat,
  output fft_mode_e mode,      // configuration in effect
  output logic      inverse,
  output logic [5:0] stage_use
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  // pipeline latency in beats of the stages in use: (R-1)*L + 2 per stage
  function automatic int unsigned pipe_latency(fft_mode_e m);
    int unsigned p;
    p = 1538 + 450 + 58 + 9;              // stages 3..6
    if (m != MODE_2K) p += 2048 + 2;      // stage 2
    if (m == MODE_8K) p += 4096 + 2;      // stage 1
    return p;
  endfunction

  state_e        state;
  fft_mode_e     mode_q;
  logic          inv_q;
  logic [14:0]   in_cnt;     // samples of the current symbol taken so far
  logic [15:0]   dcnt;
  logic          cfg_change;
  int unsigned   npts;

  // While idle the pipeline is empty, so the configuration arriving with
  // the head is in effect at once, for the head sample itself.
  always_comb begin
    mode    = (state == S_IDLE) ? mode_in : mode_q;
    inverse = (state == S_IDLE) ? inverse_in : inv_q;
  end

  always_comb begin
    npts       = mode_points(mode);
    cfg_change = (mode_in != mode) || (inverse_in != inverse);
    in_ready   = 1'b1;
    beat       = 1'b0;
    drain      = 1'b0;
    head_beat  = 1'b0;
    unique case (state)
      S_IDLE: begin
        beat      = in_valid && headin;
        head_beat = beat;
      end
      S_RUN: begin
        if (in_valid && headin && cfg_change) begin
          // refuse the head; this cycle is already the first drain beat
          in_ready = 1'b0;
          beat     = 1'b1;
          drain    = 1'b1;
        end else begin
          beat      = in_valid;
          head_beat = in_valid && headin;
        end
      end
      default: begin
        in_ready = 1'b0;
        beat     = 1'b1;
        drain    = 1'b1;
      end
    endcase
    unique case (mode)
      MODE_8K: stage_use = 6'b111111;
      MODE_4K: stage_use = 6'b111110;
      default: stage_use = 6'b111100;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      mode_q  <= MODE_8K;
      inv_q   <= 1'b0;
      in_cnt  <= '0;
      dcnt    <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (in_valid && headin) begin
            mode_q  <= mode_in;
            inv_q   <= inverse_in;
            in_cnt  <= 15'd1;
            state   <= S_RUN;
          end
        S_RUN:
          if (in_valid && headin && cfg_change) begin
            dcnt  <= 16'(pipe_latency(mode) + npts - 1 +
                         ((in_cnt == '0) ? 0 : npts - int'(in_cnt)));
            state <= S_DRAIN;
          end else if (beat) begin
            if (headin || in_cnt == 15'(npts - 1)) in_cnt <= headin ? 15'd1 : '0;
            else in_cnt <= in_cnt + 15'd1;
          end
        default: begin
          dcnt <= dcnt - 16'd1;
          if (dcnt == 16'd1) state <= S_IDLE;
        end
      endcase
    end

  // a drain beat never takes an input sample
  a_drain_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
    drain |-> !in_ready);
  // the configuration of the pipeline changes only while it is empty
  a_cfg_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |=> $stable(mode_q) && $stable(inv_q));
endmodule
