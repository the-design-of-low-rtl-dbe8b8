// tb_wft5_s2_bfly: checks stages B1-B3 (matrix S2) on their own.
//
// Random blocks are fed in the order x0, x1, x2, x4, x3 at phase 1..5. For
// each block the values handed to the multiplier must be, in the next
// clocks,
//   phase 5: a3 = x1-x4,            phase 1: a5 = x2-x3,
//   phase 2: a1 = x1+x2+x3+x4,      phase 3: a2 = x1-x2-x3+x4,
//   phase 4: a4 = x1+x2-x3-x4,
// and a0 = x0+x1+x2+x3+x4 must be held from phase 4 to the next phase 3.
// These are the rows of S2 worked out from the input samples.
`timescale 1ns/1ps
module tb_wft5_s2_bfly;
  import wft5_pkg::*;
  localparam int NB = 300;

  logic clk = 0, rst_n = 0;
  phase_t phase;
  cplx_in_t din;
  cplx_t mul_out, a0;
  int checks = 0, failures = 0;

  wft5_s2_bfly dut (.*);
  always #5 clk = ~clk;

  int xr [NB + 3][5], xi [NB + 3][5];   // natural index 0..4
  int feed [5] = '{0, 1, 2, 4, 3};

  function automatic int rowv(int b, int r, bit im);
    int v [5];
    for (int n = 0; n < 5; n++) v[n] = im ? xi[b][n] : xr[b][n];
    case (r)
      0: return v[0] + v[1] + v[2] + v[3] + v[4];
      1: return v[1] + v[2] + v[3] + v[4];
      2: return v[1] - v[2] - v[3] + v[4];
      3: return v[1] - v[4];
      4: return v[1] + v[2] - v[3] - v[4];
      default: return v[2] - v[3];
    endcase
  endfunction

  task automatic expect_row(int b, int r, cplx_t got, string what);
    checks++;
    if (int'(got.re) != rowv(b, r, 0) || int'(got.im) != rowv(b, r, 1)) begin
      failures++;
      if (failures < 10) $display("FAIL block %0d %s a%0d got (%0d,%0d) exp (%0d,%0d)", b, what, r,
                                  got.re, got.im, rowv(b, r, 0), rowv(b, r, 1));
    end
  endtask

  initial begin
    for (int b = 0; b < NB + 3; b++)
      for (int n = 0; n < 5; n++) begin
        xr[b][n] = (b == 0) ? -1024 : (b == 1) ? 1023 : int'($urandom_range(0, 2047)) - 1024;
        xi[b][n] = (b == 0) ? 1023 : (b == 1) ? -1024 : int'($urandom_range(0, 2047)) - 1024;
      end
    phase = 3'd1;
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB + 2; b++)
      for (int s = 0; s < 5; s++) begin
        phase = 3'(s + 1);
        din.re = DATA_W'(xr[b][feed[s]]);
        din.im = DATA_W'(xi[b][feed[s]]);
        #1;
        // combinational outputs during this clock
        if (b >= 1) begin
          case (s)
            0: expect_row(b - 1, 5, mul_out, "mul");
            1: expect_row(b - 1, 1, mul_out, "mul");
            2: expect_row(b - 1, 2, mul_out, "mul");
            3: expect_row(b - 1, 4, mul_out, "mul");
            default: ;
          endcase
          if (s >= 3) expect_row(b - 1, 0, a0, "a0");
        end
        if (b >= 2 && s <= 2) expect_row(b - 2, 0, a0, "a0");
        if (s == 4) expect_row(b, 3, mul_out, "mul");
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
