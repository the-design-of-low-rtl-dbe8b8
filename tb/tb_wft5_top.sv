// tb_wft5_top: end-to-end test of the pipelined 5-point WFT.
//
// Streams blocks of five complex Q2.9 samples into wft5_top, one per clock
// in natural order, and compares every output bin with a 5-point DFT
// computed here in floating point from the same samples. The tolerance
// (0.012, about six output LSBs) covers the fixed constants of the
// reconfigurable multipliers (error below 4.3e-4) and their truncation.
// Stimulus: an impulse, a constant, full-scale corner blocks (largest sums,
// to show the 14-bit internal words do not overflow) and random blocks.
// Also checked: X0 of the first block appears exactly 19 clocks after reset
// is released, out_valid/out_sof/out_k agree with the stream, the Table I
// control signals match the counter, and every multiplier configuration
// (m1..m5), the switch/negator for j, and the x3/x4 reordering of the input
// buffer were exercised.
`timescale 1ns/1ps
module tb_wft5_top;
  import wft5_pkg::*;

  localparam int  NBLK  = 400;
  localparam real LSB   = 1.0 / 512.0;
  localparam real TOL   = 0.012;
  localparam real PI    = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] in_re, in_im;
  logic in_sof, out_valid, out_sof;
  logic [W-1:0] out_re, out_im;
  logic [2:0] out_k;
  logic [5:1] ctrl_c;

  int checks = 0, failures = 0;
  int cycle = 0;

  // stimulus memory: block b, sample n
  int sre [NBLK][5];
  int sim [NBLK][5];

  int n_coef [5];
  int n_j = 0, n_swap = 0, n_full = 0;

  wft5_top dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  function automatic int rnd11();
    return int'($urandom_range(0, 2047)) - 1024;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 5; n++) begin
        if (b == 0) begin sre[b][n] = (n == 0) ? 511 : 0; sim[b][n] = 0; end
        else if (b == 1) begin sre[b][n] = 300; sim[b][n] = -200; end
        else if (b == 2) begin sre[b][n] = -1024; sim[b][n] = -1024; end
        else if (b == 3) begin sre[b][n] = 1023; sim[b][n] = 1023; end
        else if (b == 4) begin sre[b][n] = (n % 2) ? -1024 : 1023; sim[b][n] = (n < 3) ? 1023 : -1024; end
        else if (b == 5) begin sre[b][n] = (n == 3) ? 700 : 0; sim[b][n] = (n == 4) ? -600 : 0; end
        else begin sre[b][n] = rnd11(); sim[b][n] = rnd11(); end
      end
  end

  // drive: sample n of block b at clock 5*b+n after reset
  int in_idx = 0;
  always_comb begin
    if (in_idx < NBLK * 5) begin
      in_re = DATA_W'(sre[in_idx / 5][in_idx % 5]);
      in_im = DATA_W'(sim[in_idx / 5][in_idx % 5]);
    end else begin
      in_re = '0;
      in_im = '0;
    end
  end

  // reference DFT of block b, bin k, in units of 1.0
  function automatic void dft(int b, int k, output real xr, output real xi);
    xr = 0.0; xi = 0.0;
    for (int n = 0; n < 5; n++) begin
      real ang, vr, vi;
      ang = -2.0 * PI * real'(n * k) / 5.0;
      vr = real'(sre[b][n]) * LSB;
      vi = real'(sim[b][n]) * LSB;
      xr += vr * $cos(ang) - vi * $sin(ang);
      xi += vr * $sin(ang) + vi * $cos(ang);
    end
  endfunction

  int out_idx = 0;
  int first_valid = -1;
  real max_err = 0.0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      // input side
      if (in_sof !== ((in_idx % 5) == 0)) fail("in_sof misaligned");
      in_idx <= in_idx + 1;
      // Table I
      begin
        logic [5:1] exp_c;
        unique case (dut.phase)
          3'd1: exp_c = 5'b00110;
          3'd2: exp_c = 5'b01101;
          3'd3: exp_c = 5'b10110;
          3'd4: exp_c = 5'b01000;
          3'd5: exp_c = 5'b01000;
          default: exp_c = 5'b00000;
        endcase
        checks++;
        if (ctrl_c !== exp_c) fail($sformatf("ctrl_c %b exp %b", ctrl_c, exp_c));
      end
      // mechanism counters
      n_coef[dut.mctl.sel]++;
      if (dut.mctl.j_en) n_j++;
      if (dut.phase == 3'd4 && dut.x_fed.re == DATA_W'(sre[in_idx/5 - 1][4])
          && in_idx >= 5 && sre[in_idx/5 - 1][4] != sre[in_idx/5 - 1][3]) n_swap++;
      // output side
      if (out_valid) begin
        int b, k;
        real xr, xi, er, ei;
        if (first_valid < 0) begin
          first_valid = cycle;
          checks++;
          if (cycle != 19) fail($sformatf("first output at clock %0d, expected 19", cycle));
        end
        b = out_idx / 5;
        k = out_idx % 5;
        checks++;
        if (out_k != 3'(k) || out_sof != (k == 0)) fail($sformatf("out_k %0d exp %0d", out_k, k));
        if (b < NBLK) begin
          dft(b, k, xr, xi);
          er = real'($signed(out_re)) * LSB - xr;
          ei = real'($signed(out_im)) * LSB - xi;
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          checks++;
          if (er > TOL || ei > TOL)
            fail($sformatf("block %0d X%0d got (%f,%f) exp (%f,%f)", b, k,
                 real'($signed(out_re)) * LSB, real'($signed(out_im)) * LSB, xr, xi));
          if (k == 4) n_full++;
        end
        out_idx <= out_idx + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (out_idx == NBLK * 5);
    @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_coef[i] == 0) fail($sformatf("coefficient m%0d never configured", i + 1));
    end
    checks++; if (n_j == 0)    fail("switch/negator never active");
    checks++; if (n_swap == 0) fail("input reordering never observed");
    checks++; if (n_full != NBLK) fail($sformatf("%0d complete transforms, expected %0d", n_full, NBLK));
    $display("transforms=%0d m1..m5 uses=%0d/%0d/%0d/%0d/%0d j_uses=%0d swaps=%0d max_err=%f (LSB=%f)",
             n_full, n_coef[0], n_coef[1], n_coef[2], n_coef[3], n_coef[4], n_j, n_swap, max_err, LSB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 5 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
