// wft5_pkg: word widths, sample types and control types shared by the
// pipelined 5-point Winograd Fourier transform.
//
// Input samples are complex, each part an 11-bit two's-complement number
// with 2 integer bits (sign included) and 9 fraction bits (Q2.9), as the
// design specifies. Inside the pipeline every word carries 3 more integer
// bits (Q5.9, 14 bits) so that the sum of five inputs and every DFT output
// (|Re X|, |Im X| < 5*2*sqrt(2)) fit without overflow; that growth is this
// design's own choice.
//
// The counter that sequences the pipeline counts 1..5; phase_t carries it.
// mult_ctl_t is the configuration the control logic hands to the multiplier
// stage: the coefficient index that steers the three multiplexers of each
// reconfigurable multiplier block, the two adder carry-ins, and the enable
// of the switch and negator that realise a multiplication by j.
package wft5_pkg;

  localparam int DATA_W = 11;             // input word: Q2.9
  localparam int FRAC_W = 9;
  localparam int GROW_W = 3;              // internal growth
  localparam int W      = DATA_W + GROW_W; // internal word: Q5.9
  localparam int N      = 5;              // transform length

  typedef logic [2:0] phase_t;            // counter value 1..5

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_in_t;

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  // Coefficient index = multiplexer input of the ReMB (m1 is input 0).
  typedef enum logic [2:0] {
    COEF_M1 = 3'd0,   // 1 - (cos u + cos 2u)/2            =  1.25
    COEF_M2 = 3'd1,   // (cos 2u - cos u)/2                = -0.559
    COEF_M3 = 3'd2,   // j (sin u + sin 2u)                = j 1.539
    COEF_M4 = 3'd3,   // j sin u                           = j 0.951
    COEF_M5 = 3'd4    // j (sin u - sin 2u)                = j 0.363
  } coef_e;

  typedef struct packed {
    coef_e sel;       // multiplexer select of both ReMBs
    logic  i1;        // carry-in of the first ReMB adder
    logic  i2;        // carry-in of the second ReMB adder
    logic  j_en;      // switch crossed and negator active (m3..m5)
  } mult_ctl_t;

  function automatic cplx_t widen(cplx_in_t x);
    cplx_t y;
    y.re = W'(x.re);
    y.im = W'(x.im);
    return y;
  endfunction

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t y;
    y.re = a.re + b.re;
    y.im = a.im + b.im;
    return y;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t y;
    y.re = a.re - b.re;
    y.im = a.im - b.im;
    return y;
  endfunction

endpackage
