// wft5_top: pipelined 5-point Winograd Fourier transform.
//
// Computes X = S1 * M * S2 * x for blocks of five complex samples streamed in
// one per clock, and streams the five DFT bins out one per clock, both in
// natural order. The Winograd factorisation needs 17 complex additions and
// 5 real-by-complex multiplications per block; because samples arrive
// serially, each group of stages is folded onto one shared unit:
//   input buffer  natural order -> feeding order x0, x1, x2, x4, x3
//   B1-B3         one butterfly, five operations per block (matrix S2)
//   B4            two reconfigurable multiplier blocks + switch + negator
//                 (matrix M, one coefficient per clock)
//   B5-B6         one butterfly, four operations per block (first part of S1)
//   B7            one plain butterfly, two operations per block, and the
//                 natural-order output selection
// A 3-bit counter (001..101) in the control logic sequences all of them.
//
// Interface: in_re/in_im are 11-bit Q2.9 (2 integer bits, 9 fraction bits).
// A new block starts every 5 clocks: in_sof is high in the clock whose input
// is taken as x0. out_re/out_im are 14-bit Q5.9; out_k is the bin index of
// the current output and out_sof marks X0. out_valid rises 19 clocks after
// reset is released, when the first block's X0 appears, and stays high.
// Latency from x0 in to X0 out is 19 clocks. ctrl_c shows the control
// signals c1..c5 of the counter decode (bit k-1 is c_k).
// The stage structure follows the design; handshake-free streaming, word
// growth to 14 bits, the latency and the output flags are this design's own.
module wft5_top
  import wft5_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] in_re,
  input  logic [DATA_W-1:0] in_im,
  output logic              in_sof,
  output logic [W-1:0]      out_re,
  output logic [W-1:0]      out_im,
  output logic              out_valid,
  output logic              out_sof,
  output logic [2:0]        out_k,
  output logic [5:1]        ctrl_c
);

  localparam int LATENCY = 19;

  phase_t    phase;
  mult_ctl_t mctl;
  cplx_in_t  x_fed;
  cplx_t     to_mult, a0, b, p, q, e, g, x0, y;
  logic [4:0] fill;

  wft5_ctrl u_ctrl (
    .clk, .rst_n, .phase, .c (ctrl_c), .mctl
  );

  wft5_reorder #(.W(DATA_W), .N(N)) u_inbuf (
    .clk, .rst_n, .phase,
    .din_re (in_re), .din_im (in_im),
    .dout_re (x_fed.re), .dout_im (x_fed.im)
  );

  wft5_s2_bfly u_b123 (
    .clk, .rst_n, .phase, .din (x_fed), .mul_out (to_mult), .a0
  );

  wft5_mult_stage u_b4 (
    .clk, .rst_n, .din (to_mult), .mctl, .dout (b)
  );

  wft5_s1_bfly u_b56 (
    .clk, .rst_n, .phase, .din (b), .b0 (a0), .p, .q, .e, .g, .x0
  );

  wft5_bfly_out u_b7 (
    .clk, .rst_n, .phase, .p, .q, .e, .g, .x0, .dout (y)
  );

  assign in_sof = (phase == 3'd1);
  assign out_re = y.re;
  assign out_im = y.im;

  // Bin index of the registered output (X0 leaves during phase 5).
  always_comb begin
    unique case (phase)
      3'd5:    out_k = 3'd0;
      3'd1:    out_k = 3'd1;
      3'd2:    out_k = 3'd2;
      3'd3:    out_k = 3'd3;
      default: out_k = 3'd4;
    endcase
  end
  assign out_sof = out_valid && (out_k == 3'd0);

  always_ff @(posedge clk) begin
    if (!rst_n)                  fill <= '0;
    else if (fill != 5'(LATENCY)) fill <= fill + 5'd1;
  end
  assign out_valid = (fill == 5'(LATENCY));

endmodule
