// wft5_s2_bfly: stages B1-B3 of the pipelined 5-point WFT (the input
// additions, matrix S2).
//
// The three stages of additions before the multipliers hold five butterfly
// operations (three full, two half). Samples arrive one per clock, so a
// single butterfly - one adder and one subtractor behind two operand
// multiplexers - performs all five, one per clock, and writes its results
// into stage registers. With the counter value ph and inputs fed in the
// order x0, x1, x2, x4, x3 at ph = 1..5 the schedule is
//     ph 4 : s14 = x1 + x4,  a3 = x1 - x4      (x4 arriving)
//     ph 5 : s23 = x2 + x3,  a5 = x2 - x3      (x3 arriving)
//     ph 1 : a1  = s14 + s23, a2 = s14 - s23   (next transform's x0 arriving)
//     ph 2 : a4  = a3 + a5
//     ph 3 : a0  = x0 + a1
// x0 passes through a two-deep shift register because its transform's a0 is
// formed while the next transform is already entering. The output
// multiplexer hands the multiplier stage one value per clock:
//     ph 5: a3, ph 1: a5, ph 2: a1, ph 3: a2, ph 4: a4
// (coefficients m3, m5, m1, m2, m4), and a0 (coefficient m0 = 1) is held on
// its own output from ph 4 to the following ph 3.
// The schedule and register allocation are this design's own; the design
// gives the single shared butterfly and its shift/stage registers.
//
// Interface: din is an 11-bit Q2.9 complex sample, sign-extended inside;
// outputs are 14-bit Q5.9. mul_out is combinational from registers.
module wft5_s2_bfly
  import wft5_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  phase_t   phase,
  input  cplx_in_t din,
  output cplx_t    mul_out,
  output cplx_t    a0
);

  cplx_t x_in;
  cplx_t x0_q, x0_d;          // shift register for x0
  cplx_t x1_r, x2_r;          // input registers
  cplx_t s14, s23;            // stage-1 sums
  cplx_t a1, a2, a3, a4, a5;  // stage registers
  cplx_t op_a, op_b;          // butterfly operands
  cplx_t bf_sum, bf_dif;      // butterfly results

  assign x_in = widen(din);

  // Operand multiplexers of the shared butterfly.
  always_comb begin
    op_a = '0;
    op_b = '0;
    unique case (phase)
      3'd1: begin op_a = s14;  op_b = s23;  end
      3'd2: begin op_a = a3;   op_b = a5;   end
      3'd3: begin op_a = x0_d; op_b = a1;   end
      3'd4: begin op_a = x1_r; op_b = x_in; end
      3'd5: begin op_a = x2_r; op_b = x_in; end
      default: ;
    endcase
  end

  assign bf_sum = cadd(op_a, op_b);
  assign bf_dif = csub(op_a, op_b);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x0_q <= '0; x0_d <= '0; x1_r <= '0; x2_r <= '0;
      s14  <= '0; s23  <= '0;
      a0   <= '0; a1   <= '0; a2 <= '0; a3 <= '0; a4 <= '0; a5 <= '0;
    end else begin
      unique case (phase)
        3'd1: begin x0_q <= x_in; a1  <= bf_sum; a2 <= bf_dif; end
        3'd2: begin x1_r <= x_in; a4  <= bf_sum;               end
        3'd3: begin x2_r <= x_in; a0  <= bf_sum;               end
        3'd4: begin x0_d <= x0_q; s14 <= bf_sum; a3 <= bf_dif; end
        3'd5: begin               s23 <= bf_sum; a5 <= bf_dif; end
        default: ;
      endcase
    end
  end

  // Output multiplexer towards the multiplier stage.
  always_comb begin
    unique case (phase)
      3'd1:    mul_out = a5;
      3'd2:    mul_out = a1;
      3'd3:    mul_out = a2;
      3'd4:    mul_out = a4;
      default: mul_out = a3;
    endcase
  end

endmodule
