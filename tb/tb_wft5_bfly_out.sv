// tb_wft5_bfly_out: checks the last stage (B7) and the natural-order output
// selection on their own.
//
// For each random block of stage-6 values the inputs change when the
// preceding stage would update them (x0 at phase 5, g at phase 1, e at
// phase 2, p and q at phase 3). The output must then be, one per clock
// during phase 5, 1, 2, 3, 4 that follow,
//   X0 = x0, X1 = q-e, X2 = p-g, X3 = p+g, X4 = q+e.
`timescale 1ns/1ps
module tb_wft5_bfly_out;
  import wft5_pkg::*;
  localparam int NB = 300;

  logic clk = 0, rst_n = 0;
  phase_t phase;
  cplx_t p, q, e, g, x0, dout;
  int checks = 0, failures = 0;

  wft5_bfly_out dut (.*);
  always #5 clk = ~clk;

  // v[b][0..4] = p, q, e, g, x0 (real and imaginary)
  int vr [NB + 3][5], vi [NB + 3][5];

  function automatic int xk(int b, int k, bit im);
    int pp, qq, ee, gg, zz;
    pp = im ? vi[b][0] : vr[b][0];
    qq = im ? vi[b][1] : vr[b][1];
    ee = im ? vi[b][2] : vr[b][2];
    gg = im ? vi[b][3] : vr[b][3];
    zz = im ? vi[b][4] : vr[b][4];
    case (k)
      0: return zz;
      1: return qq - ee;
      2: return pp - gg;
      3: return pp + gg;
      default: return qq + ee;
    endcase
  endfunction

  int ph;
  initial begin
    for (int b = 0; b < NB + 3; b++)
      for (int k = 0; k < 5; k++) begin
        vr[b][k] = int'($urandom_range(0, 4095)) - 2048;
        vi[b][k] = int'($urandom_range(0, 4095)) - 2048;
      end
    phase = 3'd1; p = '0; q = '0; e = '0; g = '0; x0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // period n: phase 5 of period n carries x0 of block n; the rest of block
    // n follows in period n+1.
    for (int n = 0; n < NB + 2; n++)
      for (int s = 1; s <= 5; s++) begin
        phase = 3'(s);
        if (n >= 1 && s == 1) begin g.re = W'(vr[n-1][3]); g.im = W'(vi[n-1][3]); end
        if (n >= 1 && s == 2) begin e.re = W'(vr[n-1][2]); e.im = W'(vi[n-1][2]); end
        if (n >= 1 && s == 3) begin p.re = W'(vr[n-1][0]); p.im = W'(vi[n-1][0]);
                                    q.re = W'(vr[n-1][1]); q.im = W'(vi[n-1][1]); end
        if (s == 5) begin x0.re = W'(vr[n][4]); x0.im = W'(vi[n][4]); end
        #1;
        // output during phase 5 of period n+1 is X0 of block n; X1..X4 in
        // phases 1..4 of period n+2
        begin
          int ob, ok;
          ob = -1;
          if (s == 5 && n >= 1) begin ob = n - 1; ok = 0; end
          if (s <= 4 && n >= 2) begin ob = n - 2; ok = s; end
          if (ob >= 0) begin
            checks++;
            if (int'(dout.re) != xk(ob, ok, 0) || int'(dout.im) != xk(ob, ok, 1)) begin
              failures++;
              if (failures < 10) $display("FAIL block %0d X%0d got (%0d,%0d) exp (%0d,%0d)", ob, ok,
                                          dout.re, dout.im, xk(ob, ok, 0), xk(ob, ok, 1));
            end
          end
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
