// remb: reconfigurable multiplier block (ReMB) for the constants of the
// 5-point WFT.
//
// Multiplies a real input by one of five fixed constants picked by sel,
// with no general multiplier: a pre-adder forms P = IN + IN/2, three 5-input
// multiplexers pick shifted (and possibly inverted) copies of IN and P, and
// two chained adders sum them:
//     OUT = A + (B >>> SH_B) + i1 + (C >>> SH_C) + i2
// An inverted input together with a carry-in of 1 subtracts that term. The
// topology (pre-adder, three 5-input multiplexers in coefficient order, the
// two lower multiplexers shifted before the adders, two adders with
// carry-ins) follows the design. The multiplexer contents and the two
// post-multiplexer shifts are this design's own canonical-signed-digit
// choice, picked so that each constant is met to better than 4.3e-4:
//
//   sel  constant           A          B (>>>2)     C (>>>5)     value
//   0    m1  =  1.25        IN         IN           0            1.25
//   1    m2  = -0.559017    ~(P>>1)    P>>1         IN>>3       -0.55859375
//   2   |m3| =  1.538842    P          IN>>3        IN>>2        1.5390625
//   3   |m4| =  0.951057    IN         ~(P>>3)      ~(IN>>4)     0.951171875
//   4   |m5| =  0.363271    IN>>1      ~(IN>>1)     ~(P>>2)      0.36328125
//
// Carry-ins i1, i2 come from the control logic (1 where a term of that
// adder is inverted). The input is widened by G guard bits so that every
// shift and every negation is exact; the sum is truncated back to W bits
// (floor), i.e. the product carries at most one LSB of rounding error on top
// of the constant's approximation error.
//
// Interface: din/dout are signed W-bit words with 9 fraction bits; the block
// is purely combinational.
module remb #(
  parameter int W    = 14,   // data word width
  parameter int G    = 10,   // guard fraction bits inside the block
  parameter int SH_B = 2,    // shift after the middle multiplexer
  parameter int SH_C = 5     // shift after the bottom multiplexer
) (
  input  logic signed [W-1:0] din,
  input  logic [2:0]          sel,
  input  logic                i1,
  input  logic                i2,
  output logic signed [W-1:0] dout
);

  localparam int WI = W + 2 + G;    // two headroom bits for P and the sums

  logic signed [WI-1:0] x, p;
  logic signed [WI-1:0] mux_a, mux_b, mux_c;
  logic signed [WI-1:0] sh_b, sh_c;     // hard-wired shifts after the muxes
  logic signed [WI-1:0] cin1, cin2;     // carry-ins as signed words
  logic signed [WI-1:0] sum1, sum2;

  assign x = WI'(din) <<< G;
  assign p = x + (x >>> 1);         // pre-adder: 1.5 * IN

  always_comb begin
    unique case (sel)
      3'd0: begin mux_a = x;           mux_b = x;           mux_c = '0;          end
      3'd1: begin mux_a = ~(p >>> 1);  mux_b = p >>> 1;     mux_c = x >>> 3;     end
      3'd2: begin mux_a = p;           mux_b = x >>> 3;     mux_c = x >>> 2;     end
      3'd3: begin mux_a = x;           mux_b = ~(p >>> 3);  mux_c = ~(x >>> 4);  end
      3'd4: begin mux_a = x >>> 1;     mux_b = ~(x >>> 1);  mux_c = ~(p >>> 2);  end
      default: begin mux_a = '0;       mux_b = '0;          mux_c = '0;          end
    endcase
  end

  assign sh_b = mux_b >>> SH_B;
  assign sh_c = mux_c >>> SH_C;
  assign cin1 = {{(WI-1){1'b0}}, i1};
  assign cin2 = {{(WI-1){1'b0}}, i2};
  assign sum1 = mux_a + sh_b + cin1;
  assign sum2 = sum1 + sh_c + cin2;
  assign dout = W'(sum2 >>> G);

endmodule
