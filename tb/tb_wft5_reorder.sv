// tb_wft5_reorder: checks the five-sample reorder buffer.
//
// Blocks of five random samples are written one per clock (phase 1..5).
// Five clocks later, in phase j, the output must be sample PERM[j] of that
// block, for the default feeding-order permutation {0,1,2,4,3}; after reset
// the buffer must read zero.
`timescale 1ns/1ps
module tb_wft5_reorder;
  localparam int W  = 11;
  localparam int NB = 300;
  localparam int PERM [5] = '{0, 1, 2, 4, 3};

  logic clk = 0, rst_n = 0;
  logic [2:0] phase;
  logic signed [W-1:0] din_re, din_im, dout_re, dout_im;
  int checks = 0, failures = 0;

  wft5_reorder dut (.*);
  always #5 clk = ~clk;

  int sr [NB][5], si [NB][5];

  initial begin
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 5; n++) begin
        sr[b][n] = int'($urandom_range(0, 2047)) - 1024;
        si[b][n] = int'($urandom_range(0, 2047)) - 1024;
      end
    phase = 3'd1; din_re = '0; din_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < 5; s++) begin
        phase = 3'(s + 1);
        din_re = W'(sr[b][s]);
        din_im = W'(si[b][s]);
        #1;
        checks++;
        if (b == 0) begin
          if (dout_re != 0 || dout_im != 0) begin failures++; $display("FAIL not cleared"); end
        end else if (int'(dout_re) != sr[b-1][PERM[s]] || int'(dout_im) != si[b-1][PERM[s]]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d slot %0d got %0d exp %0d", b - 1, s, dout_re, sr[b-1][PERM[s]]);
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * NB + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
