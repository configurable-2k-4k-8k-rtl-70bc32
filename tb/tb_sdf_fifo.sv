// tb_sdf_fifo: self-checking test of the SDF feedback buffer at its default
// length (4096).
//
// Random writes at random addresses are mirrored in a reference array; each
// cycle the asynchronous read of a random address is compared with the
// reference, including a read of the location being written in the same
// cycle, which must still return the old contents.
`timescale 1ns/1ps
module tb_sdf_fifo;
  import fft_pkg::*;
  localparam int L = 4096;

  logic clk = 1'b0, we = 1'b0;
  logic [11:0] addr = '0;
  cplx_t wdata = '0, rdata;
  cplx_t ref_mem [L];
  logic  known [L];
  int checks = 0, failures = 0;

  sdf_fifo #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < L; a++) known[a] = 1'b0;
    // fill every location once
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 12'(a); wdata = cplx_t'($urandom);
      ref_mem[a] = wdata; known[a] = 1'b1;
    end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      addr = 12'($urandom_range(0, L - 1));
      wdata = cplx_t'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        if (failures < 10) $display("MISMATCH addr %0d got %h expected %h", addr, rdata, ref_mem[addr]);
      end
      if (we) ref_mem[addr] = wdata;
    end
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
