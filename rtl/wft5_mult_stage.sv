// wft5_mult_stage: multiplier stage (B4) of the pipelined 5-point WFT.
//
// Multiplies one complex sample per clock by the element of the diagonal
// matrix M scheduled for it. Two reconfigurable multiplier blocks (remb)
// scale the real and the imaginary part by the same real constant; for the
// purely imaginary elements m3, m4, m5 a 2x2 switch crosses the two products
// and a negator on the real output completes the multiplication by j:
//     m1, m2 :  out = (m*re,  m*im)
//     m3..m5 :  out = (-|m|*im, |m|*re)
// The control logic supplies the coefficient select, the ReMB carry-ins and
// the switch/negator enable (mctl) in the same clock as the sample; the
// product is registered, so it appears one clock later. The element m0 = 1
// needs no multiplier and does not pass through this stage.
module wft5_mult_stage
  import wft5_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cplx_t     din,
  input  mult_ctl_t mctl,
  output cplx_t     dout
);

  logic signed [W-1:0] prod_re, prod_im;   // ReMB outputs
  logic signed [W-1:0] sw_top, sw_bot;     // switch outputs
  cplx_t               res;

  remb #(.W(W)) u_remb_re (
    .din (din.re), .sel (mctl.sel), .i1 (mctl.i1), .i2 (mctl.i2), .dout (prod_re)
  );

  remb #(.W(W)) u_remb_im (
    .din (din.im), .sel (mctl.sel), .i1 (mctl.i1), .i2 (mctl.i2), .dout (prod_im)
  );

  // 2x2 switch: straight for real coefficients, crossed for imaginary ones.
  assign sw_top = mctl.j_en ? prod_im : prod_re;
  assign sw_bot = mctl.j_en ? prod_re : prod_im;

  // Negator on the real output, active together with the switch.
  assign res.re = mctl.j_en ? -sw_top : sw_top;
  assign res.im = sw_bot;

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= res;
  end

endmodule
