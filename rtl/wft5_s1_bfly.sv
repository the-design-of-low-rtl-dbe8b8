// wft5_s1_bfly: stages B5-B6 of the pipelined 5-point WFT (first two stages
// of the output additions, matrix S1).
//
// After the multipliers the output matrix S1 needs
//     c = b0 - b1,  g = b3 - b4,  e = b4 - b5   (three half butterflies)
//     p = c + b2,   q = c - b2                  (one full butterfly)
// and the last stage then forms X1 = q - e, X4 = q + e, X2 = p - g,
// X3 = p + g, X0 = b0. The four operations of B5-B6 share one adder and one
// subtractor, one operation per clock. The products arrive from the
// multiplier one per clock (b3, b5, b1, b2, b4 at ph = 1..5) and b0 = a0 on
// its own input, valid from ph 4. Schedule:
//     ph 4 : c = b0 - b1      ph 5 : g = b3 - b4 (b4 arriving)
//     ph 1 : e = b4 - b5      ph 2 : p, q = c +- b2
// Incoming products wait in input registers; X0 is copied into a stage
// register at ph 4. The layout and schedule are this design's own: the
// design states only that one modified butterfly suffices for B5 and B6.
//
// Interface: all words 14-bit Q5.9 complex; outputs are registers. p, q are
// valid from ph 3, e from ph 2, g from ph 1 and x0 from ph 5, each for one
// full period.
module wft5_s1_bfly
  import wft5_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  cplx_t  din,
  input  cplx_t  b0,
  output cplx_t  p,
  output cplx_t  q,
  output cplx_t  e,
  output cplx_t  g,
  output cplx_t  x0
);

  cplx_t b1_r, b2_r, b3_r, b4_r, b5_r;   // input registers
  cplx_t c_r;                            // stage register
  cplx_t op_a, op_b, bf_sum, bf_dif;

  always_comb begin
    op_a = '0;
    op_b = '0;
    unique case (phase)
      3'd4: begin op_a = b0;   op_b = b1_r; end
      3'd5: begin op_a = b3_r; op_b = din;  end
      3'd1: begin op_a = b4_r; op_b = b5_r; end
      3'd2: begin op_a = c_r;  op_b = b2_r; end
      default: ;
    endcase
  end

  assign bf_sum = cadd(op_a, op_b);
  assign bf_dif = csub(op_a, op_b);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b1_r <= '0; b2_r <= '0; b3_r <= '0; b4_r <= '0; b5_r <= '0;
      c_r  <= '0; p <= '0; q <= '0; e <= '0; g <= '0; x0 <= '0;
    end else begin
      unique case (phase)
        3'd1: begin b3_r <= din; e <= bf_dif;                end
        3'd2: begin b5_r <= din; p <= bf_sum; q <= bf_dif;   end
        3'd3: begin b1_r <= din;                             end
        3'd4: begin b2_r <= din; c_r <= bf_dif; x0 <= b0;    end
        3'd5: begin b4_r <= din; g <= bf_dif;                end
        default: ;
      endcase
    end
  end

endmodule
