// wft5_ctrl: control logic of the pipelined 5-point WFT.
//
// A 3-bit counter runs 001, 010, 011, 100, 101 and wraps, one step per clock;
// one transform enters the pipeline per counter period. The counter value
// (phase) is handed to every stage, which steer their operand multiplexers
// and register enables from it.
//
// Two decodes are made from the counter:
//  * c[5:1], the control signals of the design's Table I
//    (001: c2,c3; 010: c1,c3,c4; 011: c2,c3,c5; 100: c4; 101: c4).
//    They are brought out for observation; the butterfly schedule of this
//    RTL is its own and is decoded from the phase directly.
//  * mctl, the configuration of the multiplier stage for the value that
//    enters it in the current clock: which coefficient (the multiplexer
//    input of both reconfigurable multiplier blocks), the carry-ins i1/i2
//    that turn their adders into subtractors, and whether the switch and
//    negator are active (the imaginary coefficients m3, m4, m5).
//    The coefficient order over a period follows this design's schedule:
//    phase 5: m3, 1: m5, 2: m1, 3: m2, 4: m4.
//
// Timing: phase is a register, reset to 001 by a synchronous active-low
// reset; c and mctl are combinational from it.
module wft5_ctrl
  import wft5_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  output phase_t    phase,
  output logic [5:1] c,
  output mult_ctl_t mctl
);

  always_ff @(posedge clk) begin
    if (!rst_n)               phase <= 3'd1;
    else if (phase == 3'd5)   phase <= 3'd1;
    else                      phase <= phase + 3'd1;
  end

  // Table I
  always_comb begin
    c = '0;
    unique case (phase)
      3'd1: begin c[2] = 1'b1; c[3] = 1'b1; end
      3'd2: begin c[1] = 1'b1; c[3] = 1'b1; c[4] = 1'b1; end
      3'd3: begin c[2] = 1'b1; c[3] = 1'b1; c[5] = 1'b1; end
      3'd4: c[4] = 1'b1;
      3'd5: c[4] = 1'b1;
      default: c = '0;
    endcase
  end

  // ReMB configuration. The carry-ins complete the two's-complement
  // negation of the inverted multiplexer inputs used by that coefficient
  // (see remb): m2 inverts the first adder's top operand, m4 and m5 invert
  // one operand of each adder.
  always_comb begin
    mctl = '{sel: COEF_M1, i1: 1'b0, i2: 1'b0, j_en: 1'b0};
    unique case (phase)
      3'd5: mctl = '{sel: COEF_M3, i1: 1'b0, i2: 1'b0, j_en: 1'b1};
      3'd1: mctl = '{sel: COEF_M5, i1: 1'b1, i2: 1'b1, j_en: 1'b1};
      3'd2: mctl = '{sel: COEF_M1, i1: 1'b0, i2: 1'b0, j_en: 1'b0};
      3'd3: mctl = '{sel: COEF_M2, i1: 1'b1, i2: 1'b0, j_en: 1'b0};
      3'd4: mctl = '{sel: COEF_M4, i1: 1'b1, i2: 1'b1, j_en: 1'b1};
      default: ;
    endcase
  end

  // The counter never leaves 001..101.
  a_phase_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  phase inside {[3'd1 : 3'd5]});

endmodule
