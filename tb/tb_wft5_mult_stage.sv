// tb_wft5_mult_stage: checks the multiplier stage (B4) on its own.
//
// Random complex samples are applied one per clock with a random
// configuration (coefficient, its carry-ins, j enable as the control logic
// sets them). One clock later the output must equal, bit for bit,
//   m1, m2 :  (floor(m*re), floor(m*im))
//   m3..m5 :  (-floor(|m|*im), floor(|m|*re))
// with m the fixed-point constants of the ReMB, and must lie within the
// constant error plus one LSB of the product by the exact WFT constant
// (m3..m5 being j times a real number).
`timescale 1ns/1ps
module tb_wft5_mult_stage;
  import wft5_pkg::*;
  localparam real LSB = 1.0 / 512.0;
  localparam real PI  = 3.14159265358979323846;
  localparam int  NT  = 3000;

  logic clk = 0, rst_n = 0;
  cplx_t din, dout;
  mult_ctl_t mctl;
  int checks = 0, failures = 0;

  wft5_mult_stage dut (.*);
  always #5 clk = ~clk;

  real mfix [5], mex [5];
  int  xr [NT], xi [NT], ks [NT];

  initial begin
    real u;
    u = 2.0 * PI / 5.0;
    mex[0] = 1.0 - ($cos(u) + $cos(2.0 * u)) / 2.0;
    mex[1] = ($cos(2.0 * u) - $cos(u)) / 2.0;
    mex[2] = $sin(u) + $sin(2.0 * u);
    mex[3] = $sin(u);
    mex[4] = $sin(u) - $sin(2.0 * u);
    mfix[0] = 1.25;             mfix[1] = -0.55859375; mfix[2] = 1.5390625;
    mfix[3] = 0.951171875;      mfix[4] = 0.36328125;
    for (int t = 0; t < NT; t++) begin
      xr[t] = int'($urandom_range(0, 8191)) - 4096;
      xi[t] = int'($urandom_range(0, 8191)) - 4096;
      ks[t] = int'($urandom_range(0, 4));
    end
    din = '0;
    mctl = '{sel: COEF_M1, i1: 0, i2: 0, j_en: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t <= NT; t++) begin
      if (t < NT) begin
        din.re = W'(xr[t]);
        din.im = W'(xi[t]);
        mctl.sel  = coef_e'(ks[t]);
        mctl.i1   = ks[t] inside {1, 3, 4};
        mctl.i2   = ks[t] inside {3, 4};
        mctl.j_en = ks[t] >= 2;
      end
      @(negedge clk);
      if (t < NT) begin
        int er, ei;
        real tr, ti, dr, di;
        if (ks[t] < 2) begin
          er = int'($floor(real'(xr[t]) * mfix[ks[t]]));
          ei = int'($floor(real'(xi[t]) * mfix[ks[t]]));
          tr = real'(xr[t]) * mex[ks[t]];
          ti = real'(xi[t]) * mex[ks[t]];
        end else begin
          er = -int'($floor(real'(xi[t]) * mfix[ks[t]]));
          ei = int'($floor(real'(xr[t]) * mfix[ks[t]]));
          tr = -real'(xi[t]) * mex[ks[t]];
          ti = real'(xr[t]) * mex[ks[t]];
        end
        checks++;
        if (int'(dout.re) != er || int'(dout.im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", t, ks[t], dout.re, dout.im, er, ei);
        end
        dr = real'(dout.re) - tr; if (dr < 0) dr = -dr;
        di = real'(dout.im) - ti; if (di < 0) di = -di;
        checks++;
        if (dr > 4.5 || di > 4.5) begin   // 4096*4.3e-4 + 1 + margin, in LSBs
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d far from exact product", t, ks[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
