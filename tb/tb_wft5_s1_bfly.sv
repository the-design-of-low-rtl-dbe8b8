// tb_wft5_s1_bfly: checks stages B5-B6 (first part of matrix S1) on their
// own.
//
// Random product blocks b0..b5 are applied as the multiplier stage delivers
// them: b3, b5, b1, b2, b4 at phase 1..5 on din, and b0 on its own input
// from phase 4 to the following phase 3. During phase 3 and 4 of the next
// period the outputs must be
//   p = b0-b1+b2, q = b0-b1-b2, e = b4-b5, g = b3-b4, x0 = b0
// worked out here from the block.
`timescale 1ns/1ps
module tb_wft5_s1_bfly;
  import wft5_pkg::*;
  localparam int NB = 300;

  logic clk = 0, rst_n = 0;
  phase_t phase;
  cplx_t din, b0, p, q, e, g, x0;
  int checks = 0, failures = 0;

  wft5_s1_bfly dut (.*);
  always #5 clk = ~clk;

  int br [NB + 2][6], bi [NB + 2][6];
  int order [5] = '{3, 5, 1, 2, 4};

  task automatic cmp(cplx_t got, int er, int ei, string what, int b);
    checks++;
    if (int'(got.re) != er || int'(got.im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL block %0d %s got (%0d,%0d) exp (%0d,%0d)", b, what, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    for (int b = 0; b < NB + 2; b++)
      for (int k = 0; k < 6; k++) begin
        br[b][k] = int'($urandom_range(0, 2047)) - 1024;
        bi[b][k] = int'($urandom_range(0, 2047)) - 1024;
      end
    phase = 3'd1; din = '0; b0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB + 2; b++)
      for (int s = 0; s < 5; s++) begin
        phase = 3'(s + 1);
        din.re = W'(br[b][order[s]]);
        din.im = W'(bi[b][order[s]]);
        if (s >= 3) begin b0.re = W'(br[b][0]); b0.im = W'(bi[b][0]); end
        #1;
        if (b >= 1 && (s == 2 || s == 3)) begin
          int pb;
          pb = b - 1;
          cmp(p, br[pb][0] - br[pb][1] + br[pb][2], bi[pb][0] - bi[pb][1] + bi[pb][2], "p", pb);
          cmp(q, br[pb][0] - br[pb][1] - br[pb][2], bi[pb][0] - bi[pb][1] - bi[pb][2], "q", pb);
          cmp(e, br[pb][4] - br[pb][5], bi[pb][4] - bi[pb][5], "e", pb);
          cmp(g, br[pb][3] - br[pb][4], bi[pb][3] - bi[pb][4], "g", pb);
          cmp(x0, br[pb][0], bi[pb][0], "x0", pb);
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
