// wft5_bfly_out: last stage (B7) of the pipelined 5-point WFT and its
// output selection.
//
// A plain butterfly (one adder, one subtractor) is used twice per transform:
//     ph 3 : X4 = q + e,  X1 = q - e
//     ph 4 : X3 = p + g,  X2 = p - g
// The results wait in output registers, and an output multiplexer, stepped
// by the counter, sends the transform out in natural order, one bin per
// clock, through an output register:
//     dout = X0, X1, X2, X3, X4  during ph = 5, 1, 2, 3, 4
// X0 (= b0) comes straight from the previous stage. This output selection
// plays the part of the output address generator; its form is this design's
// own.
//
// Interface: 14-bit Q5.9 complex words; dout is registered.
module wft5_bfly_out
  import wft5_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  cplx_t  p,
  input  cplx_t  q,
  input  cplx_t  e,
  input  cplx_t  g,
  input  cplx_t  x0,
  output cplx_t  dout
);

  cplx_t x1_r, x2_r, x3_r, x4_r;
  cplx_t op_a, op_b, bf_sum, bf_dif;
  cplx_t sel;

  assign op_a   = (phase == 3'd3) ? q : p;
  assign op_b   = (phase == 3'd3) ? e : g;
  assign bf_sum = cadd(op_a, op_b);
  assign bf_dif = csub(op_a, op_b);

  always_comb begin
    unique case (phase)
      3'd4:    sel = x0;
      3'd5:    sel = x1_r;
      3'd1:    sel = x2_r;
      3'd2:    sel = x3_r;
      default: sel = x4_r;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1_r <= '0; x2_r <= '0; x3_r <= '0; x4_r <= '0; dout <= '0;
    end else begin
      dout <= sel;
      if (phase == 3'd3) begin x4_r <= bf_sum; x1_r <= bf_dif; end
      if (phase == 3'd4) begin x3_r <= bf_sum; x2_r <= bf_dif; end
    end
  end

endmodule
