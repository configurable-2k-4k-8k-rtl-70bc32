// tb_fft_ctrl: self-checking test of the control state machine.
//
// Checks, cycle by cycle against a model kept here: samples without a head
// are dropped while idle; a head starts a symbol with the configuration it
// carries (stage_use 111111 / 111110 / 111100 for 8k / 4k / 2k); samples and
// same-configuration heads are beats; a head with a new mode or direction is
// refused and followed by a drain of exactly P + N beats after a complete
// symbol (P + N + missing samples after an incomplete one), P being the sum
// of (R-1)*L + 2 over the stages of the old mode; then the held head is
// accepted with its new configuration.
`timescale 1ns/1ps
module tb_fft_ctrl;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, headin = 1'b0, inverse_in = 1'b0;
  fft_mode_e mode_in = MODE_8K;
  logic in_ready, beat, drain, head_beat, inverse;
  fft_mode_e mode;
  logic [5:0] stage_use;
  int checks = 0, failures = 0;
  int n_drains = 0;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;

  function automatic int pipe_lat(fft_mode_e m);
    int rad [6] = '{2, 2, 4, 8, 8, 8};
    int len [6] = '{4096, 2048, 512, 64, 8, 1};
    int p = 0;
    for (int s = (m == MODE_8K) ? 0 : (m == MODE_4K) ? 1 : 2; s < 6; s++)
      p += (rad[s] - 1) * len[s] + 2;
    return p;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // present one sample at the negedge; return whether it is taken
  task automatic present(input logic h, input fft_mode_e m, input logic inv, output logic taken);
    @(negedge clk);
    in_valid = 1'b1; headin = h; mode_in = m; inverse_in = inv;
    #1 taken = in_valid && in_ready;
  endtask

  // send a symbol of n samples (the first a head) in configuration m/inv
  task automatic symbol(fft_mode_e m, logic inv, int n, int exp_drain);
    logic taken;
    int waited = 0;
    present(1'b1, m, inv, taken);
    while (!taken) begin
      // every cycle in which the head is refused is a drain beat
      expect_eq("beat while draining", int'(beat), 1);
      expect_eq("drain flag", int'(drain), 1);
      waited++;
      present(1'b1, m, inv, taken);
    end
    if (exp_drain >= 0) begin
      n_drains += (waited > 0);
      expect_eq("drain length", waited, exp_drain);
    end
    expect_eq("head beat", int'(beat && head_beat), 1);
    expect_eq("mode in effect", int'(mode), int'(m));
    expect_eq("inverse in effect", int'(inverse), int'(inv));
    expect_eq("stage_use", int'(stage_use),
              m == MODE_8K ? 6'b111111 : m == MODE_4K ? 6'b111110 : 6'b111100);
    for (int i = 1; i < n; i++) begin
      present(1'b0, m, inv, taken);
      expect_eq("sample taken", int'(taken), 1);
      expect_eq("sample beat", int'(beat && !head_beat && !drain), 1);
    end
  endtask

  initial begin
    logic taken;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // idle: samples without a head are dropped
    for (int i = 0; i < 5; i++) begin
      present(1'b0, MODE_4K, 1'b0, taken);
      expect_eq("idle drop", int'(beat), 0);
    end
    symbol(MODE_4K, 1'b0, 4096, -1);
    symbol(MODE_4K, 1'b0, 4096, 0);                       // back to back
    symbol(MODE_2K, 1'b1, 2048, pipe_lat(MODE_4K) + 4096); // new mode and direction
    symbol(MODE_2K, 1'b0, 1000, pipe_lat(MODE_2K) + 2048); // new direction
    // incomplete symbol: padded with 2048 - 1000 beats
    symbol(MODE_8K, 1'b0, 8192, pipe_lat(MODE_2K) + 2048 + 1048);
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    expect_eq("no beat without input", int'(beat), 0);
    expect_eq("drains seen", int'(n_drains >= 3), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
