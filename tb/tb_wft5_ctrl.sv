// tb_wft5_ctrl: checks the control logic: the counter runs 1..5 from reset
// and wraps, the decoded control signals equal the design's Table I in every
// state, and the multiplier configuration follows the schedule
// (phase 5: m3, 1: m5, 2: m1, 3: m2, 4: m4) with carry-ins for exactly the
// coefficients whose ReMB terms are inverted (m2, m4, m5) and the j path
// for the imaginary ones (m3, m4, m5). A second reset mid-count is checked.
`timescale 1ns/1ps
module tb_wft5_ctrl;
  import wft5_pkg::*;
  logic clk = 0, rst_n = 0;
  phase_t phase;
  logic [5:1] c;
  mult_ctl_t mctl;
  int checks = 0, failures = 0;

  wft5_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  int exp_ph;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_ph = 1;
    for (int t = 0; t < 60; t++) begin
      logic [5:1] ec;
      coef_e es;
      chk(phase == 3'(exp_ph), $sformatf("phase %0d exp %0d", phase, exp_ph));
      case (exp_ph)
        1: ec = 5'b00110; 2: ec = 5'b01101; 3: ec = 5'b10110; default: ec = 5'b01000;
      endcase
      chk(c == ec, $sformatf("c %b exp %b at %0d", c, ec, exp_ph));
      case (exp_ph)
        5: es = COEF_M3; 1: es = COEF_M5; 2: es = COEF_M1; 3: es = COEF_M2; default: es = COEF_M4;
      endcase
      chk(mctl.sel == es, "coefficient select");
      chk(mctl.j_en == (es inside {COEF_M3, COEF_M4, COEF_M5}), "j enable");
      chk(mctl.i1 == (es inside {COEF_M2, COEF_M4, COEF_M5}), "carry-in i1");
      chk(mctl.i2 == (es inside {COEF_M4, COEF_M5}), "carry-in i2");
      exp_ph = (exp_ph == 5) ? 1 : exp_ph + 1;
      if (t == 32) begin
        @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1; exp_ph = 1;
        chk(phase == 3'd1, "phase after reset");
        continue;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
