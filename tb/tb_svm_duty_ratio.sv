// tb_svm_duty_ratio -- checks the three comparison levels.
//
// For random on-times with ta+tb+tz = T the levels must be
// d1 = 1 - tz/2T, d2 = d1 - ta/T, d3 = d2 - tb/T scaled by HALF_PERIOD, to
// within 1 count of rounding, with c1 >= c2 >= c3.  Edge cases: all zero
// time (c = H, H, H), all active time (c1 = H, c3 = 0).  Runs with the
// default HALF_PERIOD (1 kHz carrier at 50 MHz) and with a 2.55 kHz one.
module tb_svm_duty_ratio;
  import svm_pkg::*;

  localparam int H1 = 25000;
  localparam int H2 = 9804;

  logic [15:0] ta, tb, tz;
  logic [15:0] a1, a2, a3;
  logic [14:0] b1, b2, b3;
  int checks = 0, failures = 0;

  svm_duty_ratio dut1 (.ta(ta), .tb(tb), .tz(tz), .c1(a1), .c2(a2), .c3(a3));
  svm_duty_ratio #(.HALF_PERIOD(H2)) dut2 (.ta(ta), .tb(tb), .tz(tz), .c1(b1), .c2(b2), .c3(b3));

  task automatic chk(int got, real exp, string what);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s ta=%0d tb=%0d tz=%0d got=%0d exp=%f", what, ta, tb, tz, got, exp);
    end
  endtask

  task automatic apply(int a, int b);
    real fa, fb, fz;
    ta = 16'(a); tb = 16'(b); tz = 16'(32768 - a - b);
    #1;
    fa = a / 32768.0; fb = b / 32768.0; fz = (32768 - a - b) / 32768.0;
    chk(int'(a1), H1 * (1.0 - fz / 2.0), "c1");
    chk(int'(a2), H1 * (1.0 - fz / 2.0 - fa), "c2");
    chk(int'(a3), H1 * (1.0 - fz / 2.0 - fa - fb), "c3");
    chk(int'(b1), H2 * (1.0 - fz / 2.0), "c1 2.55kHz");
    chk(int'(b2), H2 * (1.0 - fz / 2.0 - fa), "c2 2.55kHz");
    chk(int'(b3), H2 * (fz / 2.0), "c3 2.55kHz (tz/2T)");
    checks++;
    if (!(a1 >= a2 && a2 >= a3)) begin failures++; $display("FAIL order"); end
  endtask

  initial begin
    apply(0, 0);
    apply(32768, 0);
    apply(0, 32768);
    apply(16384, 16384);
    apply(19565, 4435);   // the worked example, 597.07 us and 135.35 us of 1 ms
    // d1 = 1 - 267.584us/(2*1ms) -> 21655 counts of 25000
    chk(int'(a1), 21655.2, "example c1");
    for (int i = 0; i < 2000; i++) begin
      int a, b;
      a = $urandom % 32769;
      b = $urandom % (32769 - a);
      apply(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
