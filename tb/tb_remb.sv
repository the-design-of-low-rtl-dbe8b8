// tb_remb: checks the reconfigurable multiplier block on its own.
//
// For every coefficient select, with the carry-ins the control logic uses,
// random and corner inputs are multiplied and compared with
//  (a) the exact product by the block's fixed-point constant, floored to
//      9 fraction bits (bit-exact check), and
//  (b) the product by the exact WFT constant from trigonometry, within
//      4.3e-4*|x| plus one LSB (checks that the constants are the WFT's).
`timescale 1ns/1ps
module tb_remb;
  localparam int  W   = 14;
  localparam real LSB = 1.0 / 512.0;
  localparam real PI  = 3.14159265358979323846;

  logic signed [W-1:0] din, dout;
  logic [2:0] sel;
  logic i1, i2;
  int checks = 0, failures = 0;

  remb #(.W(W)) dut (.din, .sel, .i1, .i2, .dout);

  real mexact [5];
  real mfix   [5];
  bit  car1   [5] = '{0, 1, 0, 1, 1};
  bit  car2   [5] = '{0, 0, 0, 1, 1};

  initial begin
    real u;
    u = 2.0 * PI / 5.0;
    mexact[0] = 1.0 - ($cos(u) + $cos(2.0 * u)) / 2.0;
    mexact[1] = ($cos(2.0 * u) - $cos(u)) / 2.0;
    mexact[2] = $sin(u) + $sin(2.0 * u);
    mexact[3] = $sin(u);
    mexact[4] = $sin(u) - $sin(2.0 * u);
    mfix[0] = 1.25;
    mfix[1] = -0.75 + 0.1875 + 1.0 / 256.0;
    mfix[2] = 1.5 + 1.0 / 32.0 + 1.0 / 128.0;
    mfix[3] = 1.0 - 3.0 / 64.0 - 1.0 / 512.0;
    mfix[4] = 0.5 - 0.125 - 3.0 / 256.0;
    for (int k = 0; k < 5; k++)
      for (int t = 0; t < 2000; t++) begin
        int x;
        real expf, got, err;
        if (t == 0)      x = 0;
        else if (t == 1) x = 4095;     // +8 - LSB: a1 full scale
        else if (t == 2) x = -4096;
        else if (t == 3) x = 1;
        else if (t == 4) x = -1;
        else             x = int'($urandom_range(0, 8191)) - 4096;
        din = W'(x);
        sel = 3'(k);
        i1 = car1[k];
        i2 = car2[k];
        #1;
        got  = real'(dout);
        expf = $floor(real'(x) * mfix[k]);
        checks++;
        if (got != expf) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d x=%0d got %0d exp %0d", k, x, dout, int'(expf));
        end
        err = got * LSB - real'(x) * LSB * mexact[k];
        if (err < 0) err = -err;
        checks++;
        if (err > 4.3e-4 * (x < 0 ? -real'(x) : real'(x)) * LSB + LSB) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d x=%0d err %f", k, x, err);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
